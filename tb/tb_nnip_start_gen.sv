// tb_nnip_start_gen: checks the 50 us start generator with a 20-clock period.
//
// A small ready model stands in for the application: after each start it
// drops cluster_rdy for a busy time chosen per step (shorter or longer than
// the period) and then raises it. The testbench checks that
//   * no start is issued while arm is low, even with cluster_rdy high;
//   * the first start follows arming at once (next clock);
//   * a start is a single clock long and never comes while cluster_rdy is low;
//   * when the application is ready in time, starts are exactly PERIOD apart;
//   * when it is late, the start comes one clock after cluster_rdy rises.
module tb_nnip_start_gen;
  localparam int unsigned P = 20;
  logic clk = 0, rst_n = 0, arm = 0, rdy = 1, s_start;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, last_start = 0, n_start = 0, busy = 0, rdy_rise = 0;
  int unsigned n_ontime = 0, n_late = 0;
  int unsigned busy_time [8] = '{5, 12, 30, 3, 45, 19, 21, 8};

  always #5 clk = ~clk;

  nnip_start_gen #(.PERIOD_CYCLES(P)) dut (.clk(clk), .rst_n(rst_n), .arm(arm),
                                           .cluster_rdy(rdy), .s_start(s_start));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // ready model and checks, sampled at the rising edge, driven after it
  logic rdy_at_prev_edge = 1, arm_at_prev_edge = 0, start_prev = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (s_start) begin
        check(rdy_at_prev_edge && arm_at_prev_edge, "start only when ready and armed");
        check(!start_prev, "start is one clock long");
        if (n_start > 0) begin
          check(cyc - last_start >= P, "starts at least one period apart");
          if (cyc - last_start == P) n_ontime++;
          else begin
            check(cyc == rdy_rise + 1, "late start one clock after ready");
            n_late++;
          end
        end
        last_start <= cyc;
        n_start <= n_start + 1;
      end
      start_prev <= s_start;
      rdy_at_prev_edge <= rdy;
      arm_at_prev_edge <= arm;
    end
  end

  always @(negedge clk) begin
    if (s_start && rst_n) begin
      rdy  = 0;
      busy = busy_time[n_start % 8];
    end else if (!rdy && busy != 0) begin
      busy--;
      if (busy == 0) begin rdy = 1; rdy_rise = cyc; end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3 * P) @(negedge clk);
    check(n_start == 0, "no start before arm");
    arm = 1;
    @(negedge clk);
    @(negedge clk);
    check(n_start == 1, "first start right after arming");
    repeat (20 * P) @(negedge clk);
    check(n_start >= 12, $sformatf("enough starts (%0d)", n_start));
    check(n_ontime > 0, "on-time starts happened");
    check(n_late > 0, "late starts happened");
    $display("starts=%0d ontime=%0d late=%0d", n_start, n_ontime, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * P) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
