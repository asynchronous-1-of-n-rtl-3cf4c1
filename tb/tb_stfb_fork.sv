// tb_stfb_fork: self-checking test of the dual-rail 1-to-2 fork buffer.
//
// A random sender drives L; two receivers with different random stalls
// take Ra and Rb. Both must receive the sent sequence. Both outputs must
// always be raised in the same cycle, and the test counts how often a new
// bit had to wait because one output was still busy.
module tb_stfb_fork;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t l_up, l_dn, l, ra_up, ra_dn, ra, rb_up, rb_dn, rb;
  logic dl; int unsigned cnta, cntb, bada, badb;
  st_wire u_wl (.clk, .rst, .up(l_up), .dn(l_dn), .rail(l));
  st_wire u_wa (.clk, .rst, .up(ra_up), .dn(ra_dn), .rail(ra));
  st_wire u_wb (.clk, .rst, .up(rb_up), .dn(rb_dn), .rail(rb));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(3)) u_src (.clk, .rst, .hold(1'b0), .rail(l), .up(l_up), .done(dl));
  stfb_fork dut (.clk, .rst, .l, .l_dn, .ra, .ra_up, .rb, .rb_up);
  tb_st_snk #(.MAXSTALL(2)) u_ka (.clk, .rst, .rail(ra), .dn(ra_dn), .count(cnta), .bad(bada));
  tb_st_snk #(.MAXSTALL(9)) u_kb (.clk, .rst, .rail(rb), .dn(rb_dn), .count(cntb), .bad(badb));

  int skew = 0, waited = 0;
  always @(posedge clk) begin
    if (!rst && ra_up != rb_up) skew++;
    // data present, one output free and the other still busy
    if (!rst && dr_full(l) && (dr_full(ra) != dr_full(rb))) waited++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6) @(posedge clk);
    rst = 0;
    wait ((cnta == NTOK && cntb == NTOK) || cyc > 60000);
    repeat (10) @(posedge clk);
    check(cnta == NTOK && cntb == NTOK, "both outputs complete");
    check(bada == 0 && badb == 0, "one-hot outputs");
    for (int i = 0; i < NTOK; i++) begin
      check(u_ka.got_q[i] == u_src.sent_q[i], $sformatf("Ra token %0d", i));
      check(u_kb.got_q[i] == u_src.sent_q[i], $sformatf("Rb token %0d", i));
    end
    check(skew == 0, "outputs driven together");
    check(waited > 0, "fork waited for a busy output");
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
