// tb_stfb_split: self-checking test of the dual-rail 1-to-2 split buffer.
//
// Random senders drive data L and control C with independent gaps; two
// receivers with random stalls take Ra and Rb. Bit i must appear on Ra if
// control bit i is 0 and on Rb if it is 1, in order on each output.
module tb_stfb_split;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t l_up, l_dn, l, c_up, c_dn, c, ra_up, ra_dn, ra, rb_up, rb_dn, rb;
  logic dl, dc; int unsigned cnta, cntb, bada, badb;
  st_wire u_wl (.clk, .rst, .up(l_up), .dn(l_dn), .rail(l));
  st_wire u_wc (.clk, .rst, .up(c_up), .dn(c_dn), .rail(c));
  st_wire u_wa (.clk, .rst, .up(ra_up), .dn(ra_dn), .rail(ra));
  st_wire u_wb (.clk, .rst, .up(rb_up), .dn(rb_dn), .rail(rb));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(5)) u_sl (.clk, .rst, .hold(1'b0), .rail(l), .up(l_up), .done(dl));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(5)) u_sc (.clk, .rst, .hold(1'b0), .rail(c), .up(c_up), .done(dc));
  stfb_split dut (.clk, .rst, .l, .l_dn, .c, .c_dn, .ra, .ra_up, .rb, .rb_up);
  tb_st_snk #(.MAXSTALL(6)) u_ka (.clk, .rst, .rail(ra), .dn(ra_dn), .count(cnta), .bad(bada));
  tb_st_snk #(.MAXSTALL(6)) u_kb (.clk, .rst, .rail(rb), .dn(rb_dn), .count(cntb), .bad(badb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned ea[$], eb[$];
    repeat (6) @(posedge clk);
    rst = 0;
    wait (cnta + cntb == NTOK || cyc > 60000);
    repeat (10) @(posedge clk);
    for (int i = 0; i < NTOK; i++)
      if (u_sc.sent_q[i] == 0) ea.push_back(u_sl.sent_q[i]); else eb.push_back(u_sl.sent_q[i]);
    check(cnta == ea.size() && cntb == eb.size(),
          $sformatf("routed counts a=%0d/%0d b=%0d/%0d", cnta, ea.size(), cntb, eb.size()));
    check(bada == 0 && badb == 0, "one-hot outputs");
    check(ea.size() > 0 && eb.size() > 0, "both routes used");
    for (int i = 0; i < ea.size() && i < int'(cnta); i++) check(u_ka.got_q[i] == ea[i], $sformatf("Ra token %0d", i));
    for (int i = 0; i < eb.size() && i < int'(cntb); i++) check(u_kb.got_q[i] == eb[i], $sformatf("Rb token %0d", i));
    check(l == 2'b00 && c == 2'b00, "data and control consumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
