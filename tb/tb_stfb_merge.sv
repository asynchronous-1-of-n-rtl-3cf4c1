// tb_stfb_merge: self-checking test of the dual-rail 2-to-1 merge buffer.
//
// Random senders drive La, Lb and the control C; a receiver with random
// stalls takes R. Output i must be the next unused bit of La when control
// bit i is 0, of Lb when it is 1. Both data senders offer bits freely, so
// the unchosen input often waits with data on it.
module tb_stfb_merge;
  import st_pkg::*;

  localparam int NTOK = 300;
  localparam int NDAT = NTOK;   // enough data on each side for any control stream

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t la_up, la_dn, la, lb_up, lb_dn, lb, c_up, c_dn, c, r_up, r_dn, r;
  logic da, db, dc; int unsigned cnt, bad;
  st_wire u_wa (.clk, .rst, .up(la_up), .dn(la_dn), .rail(la));
  st_wire u_wb (.clk, .rst, .up(lb_up), .dn(lb_dn), .rail(lb));
  st_wire u_wc (.clk, .rst, .up(c_up), .dn(c_dn), .rail(c));
  st_wire u_wr (.clk, .rst, .up(r_up), .dn(r_dn), .rail(r));
  tb_st_src #(.NTOK(NDAT), .MAXGAP(5)) u_sa (.clk, .rst, .hold(1'b0), .rail(la), .up(la_up), .done(da));
  tb_st_src #(.NTOK(NDAT), .MAXGAP(5)) u_sb (.clk, .rst, .hold(1'b0), .rail(lb), .up(lb_up), .done(db));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(5)) u_sc (.clk, .rst, .hold(1'b0), .rail(c), .up(c_up), .done(dc));
  stfb_merge dut (.clk, .rst, .la, .la_dn, .lb, .lb_dn, .c, .c_dn, .r, .r_up);
  tb_st_snk #(.MAXSTALL(4)) u_k (.clk, .rst, .rail(r), .dn(r_dn), .count(cnt), .bad(bad));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned exp_q[$];
    int ia = 0, ib = 0;
    repeat (6) @(posedge clk);
    rst = 0;
    wait (cnt == NTOK || cyc > 60000);
    repeat (10) @(posedge clk);
    for (int i = 0; i < NTOK; i++) begin
      if (u_sc.sent_q[i] == 0) begin
        if (ia >= u_sa.sent_q.size()) break;
        exp_q.push_back(u_sa.sent_q[ia]); ia++;
      end else begin
        if (ib >= u_sb.sent_q.size()) break;
        exp_q.push_back(u_sb.sent_q[ib]); ib++;
      end
    end
    check(cnt == exp_q.size(), $sformatf("merged count %0d expected %0d", cnt, exp_q.size()));
    check(bad == 0, "one-hot output");
    check(ia > 0 && ib > 0, "both inputs chosen");
    for (int i = 0; i < exp_q.size() && i < int'(cnt); i++)
      check(u_k.got_q[i] == exp_q[i], $sformatf("merged token %0d", i));
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
