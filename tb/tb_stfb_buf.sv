// tb_stfb_buf: self-checking test of the dual-rail STFB buffer.
//
// Part 1: one buffer between a random sender and a random, stalling
// receiver; every bit must come out once, in order, and a bit that has
// waited on L for over two cycles must be acknowledged 4 cycles after R was consumed (backward latency).
// Part 2: a pipeline of four buffers with a sender and receiver that never
// wait. Checks the forward latency of the first stage (2 cycles) and that
// tokens leave the pipeline once every 6 cycles in steady state.
module tb_stfb_buf;
  import st_pkg::*;

  localparam int NTOK = 200;
  localparam int DEPTH = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- part 1: single buffer, random environment ----
  dr_t l_up, l_dn, l, r_up, r_dn, r;
  logic src_done; int unsigned cnt1, bad1;
  st_wire u_wl (.clk, .rst, .up(l_up), .dn(l_dn), .rail(l));
  st_wire u_wr (.clk, .rst, .up(r_up), .dn(r_dn), .rail(r));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(4)) u_src (.clk, .rst, .hold(1'b0), .rail(l), .up(l_up), .done(src_done));
  stfb_buf dut (.clk, .rst, .l, .l_dn, .r, .r_up);
  tb_st_snk #(.MAXSTALL(6)) u_snk (.clk, .rst, .rail(r), .dn(r_dn), .count(cnt1), .bad(bad1));

  // ---- part 2: pipeline, fast environment ----
  dr_t p_up [DEPTH+1];
  dr_t p_dn [DEPTH+1];
  dr_t p    [DEPTH+1];
  logic src2_done; int unsigned cnt2, bad2;
  for (genvar i = 0; i <= DEPTH; i++) begin : g_w
    st_wire u_w (.clk, .rst, .up(p_up[i]), .dn(p_dn[i]), .rail(p[i]));
  end
  for (genvar i = 0; i < DEPTH; i++) begin : g_b
    stfb_buf u_b (.clk, .rst, .l(p[i]), .l_dn(p_dn[i]), .r(p[i+1]), .r_up(p_up[i+1]));
  end
  tb_st_src #(.NTOK(NTOK), .MAXGAP(0)) u_src2 (.clk, .rst, .hold(1'b0), .rail(p[0]), .up(p_up[0]), .done(src2_done));
  tb_st_snk #(.MAXSTALL(0)) u_snk2 (.clk, .rst, .rail(p[DEPTH]), .dn(p_dn[DEPTH]), .count(cnt2), .bad(bad2));

  // forward latency of stage 0: p[0] rises -> p[1] rises
  int t_in = -1, lat_bad = 0, lat_n = 0;
  dr_t p0_q, p1_q;
  always @(posedge clk) begin
    p0_q <= p[0]; p1_q <= p[1];
    if (!rst && p0_q == 2'b00 && p[0] != 2'b00) t_in = cyc;
    if (!rst && p1_q == 2'b00 && p[1] != 2'b00 && t_in >= 0) begin
      lat_n++;
      if (cyc - t_in != 2) lat_bad++;
    end
  end

  // backward latency of the single buffer: R consumed while a new bit is
  // already waiting on L -> L cleared
  dr_t l1_q, r1_q;
  int t_rf = -1, bwd_bad = 0, bwd_n = 0, l_age = 0;
  always @(posedge clk) begin
    l1_q <= l; r1_q <= r;
    l_age = (l != 2'b00) ? l_age + 1 : 0;
    if (!rst && r1_q != 2'b00 && r == 2'b00 && l_age > 2) t_rf = cyc;
    if (!rst && t_rf >= 0 && l1_q != 2'b00 && l == 2'b00) begin
      bwd_n++;
      if (cyc - t_rf != 4) bwd_bad++;
      t_rf = -1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6) @(posedge clk);
    rst = 0;
    wait ((cnt1 == NTOK && cnt2 == NTOK) || cyc > 40000);
    repeat (4) @(posedge clk);
    check(cnt1 == NTOK, "single buffer token count");
    for (int i = 0; i < NTOK; i++)
      check(u_snk.got_q[i] == u_src.sent_q[i], $sformatf("single buffer token %0d", i));
    check(bad1 == 0 && bad2 == 0, "one-hot output");
    check(cnt2 == NTOK, "pipeline token count");
    for (int i = 0; i < NTOK; i++)
      check(u_snk2.got_q[i] == u_src2.sent_q[i], $sformatf("pipeline token %0d", i));
    check(lat_n > 0 && lat_bad == 0, $sformatf("forward latency 2 (%0d of %0d wrong)", lat_bad, lat_n));
    check(bwd_n > 0 && bwd_bad == 0, $sformatf("backward latency 4 (%0d of %0d wrong)", bwd_bad, bwd_n));
    for (int i = 20; i < NTOK; i++)
      check(u_snk2.t_q[i] - u_snk2.t_q[i-1] == 6,
            $sformatf("cycle time 6 at token %0d: %0d", i, u_snk2.t_q[i] - u_snk2.t_q[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
