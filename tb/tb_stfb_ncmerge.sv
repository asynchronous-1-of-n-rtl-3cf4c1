// tb_stfb_ncmerge: self-checking test of the 2-to-1 non-conditional merge.
//
// Two random senders take turns (the test keeps them mutually exclusive,
// as the merge requires): after each bit the turn is drawn at random. The
// expected output is the order in which bits appeared on La or Lb.
module tb_stfb_ncmerge;
  import st_pkg::*;

  localparam int NTOK = 200;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t la_up, la_dn, la, lb_up, lb_dn, lb, r_up, r_dn, r;
  logic da, db; int unsigned cnt, bad;
  logic turn, used;
  st_wire u_wa (.clk, .rst, .up(la_up), .dn(la_dn), .rail(la));
  st_wire u_wb (.clk, .rst, .up(lb_up), .dn(lb_dn), .rail(lb));
  st_wire u_wr (.clk, .rst, .up(r_up), .dn(r_dn), .rail(r));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(3)) u_sa (.clk, .rst, .hold(turn != 1'b0 || used), .rail(la), .up(la_up), .done(da));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(3)) u_sb (.clk, .rst, .hold(turn != 1'b1 || used), .rail(lb), .up(lb_up), .done(db));
  stfb_ncmerge dut (.clk, .rst, .la, .la_dn, .lb, .lb_dn, .r, .r_up);
  tb_st_snk #(.MAXSTALL(4)) u_k (.clk, .rst, .rail(r), .dn(r_dn), .count(cnt), .bad(bad));

  // turn control and reference order
  int unsigned exp_q[$];
  int na = 0, nb = 0;
  dr_t la_q, lb_q;
  always @(posedge clk) begin
    la_q <= la; lb_q <= lb;
    if (rst) begin
      turn <= 1'b0; used <= 1'b0;
    end else begin
      if (la_q == 2'b00 && la != 2'b00) begin exp_q.push_back(32'(dr_dec(la))); na++; used <= 1'b1; end
      if (lb_q == 2'b00 && lb != 2'b00) begin exp_q.push_back(32'(dr_dec(lb))); nb++; used <= 1'b1; end
      if (used && la == 2'b00 && lb == 2'b00 && u_sa.st == 0 && u_sb.st == 0) begin
        used <= 1'b0;
        turn <= (na >= NTOK) ? 1'b1 : (nb >= NTOK) ? 1'b0 : 1'($urandom_range(1, 0));
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6) @(posedge clk);
    rst = 0;
    wait (cnt == 2 * NTOK || cyc > 60000);
    repeat (10) @(posedge clk);
    check(cnt == 2 * NTOK, $sformatf("merged count %0d", cnt));
    check(bad == 0, "one-hot output");
    check(na == NTOK && nb == NTOK, "both inputs used");
    for (int i = 0; i < 2 * NTOK && i < int'(cnt); i++)
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
