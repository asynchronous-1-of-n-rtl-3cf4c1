// tb_st_top: end-to-end test of the whole cell library at its default
// parameters.
//
// Every cell of st_top runs at the same time, each fed by random
// single-track senders (or a four-phase sender) with random gaps and read
// by receivers with random stalls. The test checks every result stream
// against a reference computed here from the values sent, and counts how
// often each mechanism of the protocol happened: back-pressure on a
// buffer, early output of the improved AND/OR gates and of the adder's
// carry, a fork waiting for a busy output, both routes of split and merge,
// both inputs of the non-conditional merge, the four-phase handshakes of
// the transmitter and receiver, data consumption, and reset clearing every
// wire. A mechanism that never happened counts as a failure. The wires'
// own assertions stop the run if a rail is ever driven both ways.
module tb_st_top;
  import st_pkg::*;

  localparam int NTOK = 150;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic ncm_turn, ncm_used;

  dr_t buf_l_up, buf_l; logic buf_l_done;
  dr_t buf_r_dn, buf_r; int unsigned buf_r_cnt, buf_r_bad;
  dr_t bufm2_l_up, bufm2_l; logic bufm2_l_done;
  dr_t bufm2_r_dn, bufm2_r; int unsigned bufm2_r_cnt, bufm2_r_bad;
  logic [3:0] buf4_l_up, buf4_l; logic buf4_l_done;
  logic [3:0] buf4_r_dn, buf4_r; int unsigned buf4_r_cnt, buf4_r_bad;
  dr_t and2_a_up, and2_a; logic and2_a_done;
  dr_t and2_b_up, and2_b; logic and2_b_done;
  dr_t and2_c_dn, and2_c; int unsigned and2_c_cnt, and2_c_bad;
  dr_t andi_a_up, andi_a; logic andi_a_done;
  dr_t andi_b_up, andi_b; logic andi_b_done;
  dr_t andi_c_dn, andi_c; int unsigned andi_c_cnt, andi_c_bad;
  dr_t or2_a_up, or2_a; logic or2_a_done;
  dr_t or2_b_up, or2_b; logic or2_b_done;
  dr_t or2_c_dn, or2_c; int unsigned or2_c_cnt, or2_c_bad;
  dr_t ori_a_up, ori_a; logic ori_a_done;
  dr_t ori_b_up, ori_b; logic ori_b_done;
  dr_t ori_c_dn, ori_c; int unsigned ori_c_cnt, ori_c_bad;
  dr_t xor2_a_up, xor2_a; logic xor2_a_done;
  dr_t xor2_b_up, xor2_b; logic xor2_b_done;
  dr_t xor2_c_dn, xor2_c; int unsigned xor2_c_cnt, xor2_c_bad;
  dr_t fork_l_up, fork_l; logic fork_l_done;
  dr_t fork_ra_dn, fork_ra; int unsigned fork_ra_cnt, fork_ra_bad;
  dr_t fork_rb_dn, fork_rb; int unsigned fork_rb_cnt, fork_rb_bad;
  dr_t ncm_la_up, ncm_la; logic ncm_la_done;
  dr_t ncm_lb_up, ncm_lb; logic ncm_lb_done;
  dr_t ncm_r_dn, ncm_r; int unsigned ncm_r_cnt, ncm_r_bad;
  dr_t split_l_up, split_l; logic split_l_done;
  dr_t split_c_up, split_c; logic split_c_done;
  dr_t split_ra_dn, split_ra; int unsigned split_ra_cnt, split_ra_bad;
  dr_t split_rb_dn, split_rb; int unsigned split_rb_cnt, split_rb_bad;
  dr_t merge_la_up, merge_la; logic merge_la_done;
  dr_t merge_lb_up, merge_lb; logic merge_lb_done;
  dr_t merge_c_up, merge_c; logic merge_c_done;
  dr_t merge_r_dn, merge_r; int unsigned merge_r_cnt, merge_r_bad;
  dr_t fa_a_up, fa_a; logic fa_a_done;
  dr_t fa_b_up, fa_b; logic fa_b_done;
  dr_t fa_ci_up, fa_ci; logic fa_ci_done;
  dr_t fa_s_dn, fa_s; int unsigned fa_s_cnt, fa_s_bad;
  dr_t fa_co_dn, fa_co; int unsigned fa_co_cnt, fa_co_bad;
  dr_t faf_a_up, faf_a; logic faf_a_done;
  dr_t faf_b_up, faf_b; logic faf_b_done;
  dr_t faf_ci_up, faf_ci; logic faf_ci_done;
  dr_t faf_s_dn, faf_s; int unsigned faf_s_cnt, faf_s_bad;
  dr_t faf_co_dn, faf_co; int unsigned faf_co_cnt, faf_co_bad;
  dr_t tx_l; logic tx_le;
  dr_t tx_r_dn, tx_r; int unsigned tx_r_cnt, tx_r_bad;
  dr_t rx_l_up, rx_l; logic rx_l_done;
  dr_t rx_r; logic rx_re;
  dr_t dc_l_up, dc_l; logic dc_l_done;
  logic dc_consumed;

  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_buf_l (.clk, .rst, .hold(1'b0), .rail(buf_l), .up(buf_l_up), .done(buf_l_done));
  tb_st_snk #(.N(2), .MAXSTALL(8)) k_buf_r (.clk, .rst, .rail(buf_r), .dn(buf_r_dn), .count(buf_r_cnt), .bad(buf_r_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_bufm2_l (.clk, .rst, .hold(1'b0), .rail(bufm2_l), .up(bufm2_l_up), .done(bufm2_l_done));
  tb_st_snk #(.N(2), .MAXSTALL(8)) k_bufm2_r (.clk, .rst, .rail(bufm2_r), .dn(bufm2_r_dn), .count(bufm2_r_cnt), .bad(bufm2_r_bad));
  tb_st_src #(.N(4), .NTOK(NTOK), .MAXGAP(4)) s_buf4_l (.clk, .rst, .hold(1'b0), .rail(buf4_l), .up(buf4_l_up), .done(buf4_l_done));
  tb_st_snk #(.N(4), .MAXSTALL(4)) k_buf4_r (.clk, .rst, .rail(buf4_r), .dn(buf4_r_dn), .count(buf4_r_cnt), .bad(buf4_r_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_and2_a (.clk, .rst, .hold(1'b0), .rail(and2_a), .up(and2_a_up), .done(and2_a_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_and2_b (.clk, .rst, .hold(1'b0), .rail(and2_b), .up(and2_b_up), .done(and2_b_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_and2_c (.clk, .rst, .rail(and2_c), .dn(and2_c_dn), .count(and2_c_cnt), .bad(and2_c_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_andi_a (.clk, .rst, .hold(1'b0), .rail(andi_a), .up(andi_a_up), .done(andi_a_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_andi_b (.clk, .rst, .hold(1'b0), .rail(andi_b), .up(andi_b_up), .done(andi_b_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_andi_c (.clk, .rst, .rail(andi_c), .dn(andi_c_dn), .count(andi_c_cnt), .bad(andi_c_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_or2_a (.clk, .rst, .hold(1'b0), .rail(or2_a), .up(or2_a_up), .done(or2_a_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_or2_b (.clk, .rst, .hold(1'b0), .rail(or2_b), .up(or2_b_up), .done(or2_b_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_or2_c (.clk, .rst, .rail(or2_c), .dn(or2_c_dn), .count(or2_c_cnt), .bad(or2_c_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_ori_a (.clk, .rst, .hold(1'b0), .rail(ori_a), .up(ori_a_up), .done(ori_a_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_ori_b (.clk, .rst, .hold(1'b0), .rail(ori_b), .up(ori_b_up), .done(ori_b_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_ori_c (.clk, .rst, .rail(ori_c), .dn(ori_c_dn), .count(ori_c_cnt), .bad(ori_c_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_xor2_a (.clk, .rst, .hold(1'b0), .rail(xor2_a), .up(xor2_a_up), .done(xor2_a_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(8)) s_xor2_b (.clk, .rst, .hold(1'b0), .rail(xor2_b), .up(xor2_b_up), .done(xor2_b_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_xor2_c (.clk, .rst, .rail(xor2_c), .dn(xor2_c_dn), .count(xor2_c_cnt), .bad(xor2_c_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(2)) s_fork_l (.clk, .rst, .hold(1'b0), .rail(fork_l), .up(fork_l_up), .done(fork_l_done));
  tb_st_snk #(.N(2), .MAXSTALL(1)) k_fork_ra (.clk, .rst, .rail(fork_ra), .dn(fork_ra_dn), .count(fork_ra_cnt), .bad(fork_ra_bad));
  tb_st_snk #(.N(2), .MAXSTALL(9)) k_fork_rb (.clk, .rst, .rail(fork_rb), .dn(fork_rb_dn), .count(fork_rb_cnt), .bad(fork_rb_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_ncm_la (.clk, .rst, .hold(ncm_turn != 1'b0 || ncm_used), .rail(ncm_la), .up(ncm_la_up), .done(ncm_la_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_ncm_lb (.clk, .rst, .hold(ncm_turn != 1'b1 || ncm_used), .rail(ncm_lb), .up(ncm_lb_up), .done(ncm_lb_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_ncm_r (.clk, .rst, .rail(ncm_r), .dn(ncm_r_dn), .count(ncm_r_cnt), .bad(ncm_r_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_split_l (.clk, .rst, .hold(1'b0), .rail(split_l), .up(split_l_up), .done(split_l_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_split_c (.clk, .rst, .hold(1'b0), .rail(split_c), .up(split_c_up), .done(split_c_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_split_ra (.clk, .rst, .rail(split_ra), .dn(split_ra_dn), .count(split_ra_cnt), .bad(split_ra_bad));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_split_rb (.clk, .rst, .rail(split_rb), .dn(split_rb_dn), .count(split_rb_cnt), .bad(split_rb_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_merge_la (.clk, .rst, .hold(1'b0), .rail(merge_la), .up(merge_la_up), .done(merge_la_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_merge_lb (.clk, .rst, .hold(1'b0), .rail(merge_lb), .up(merge_lb_up), .done(merge_lb_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_merge_c (.clk, .rst, .hold(1'b0), .rail(merge_c), .up(merge_c_up), .done(merge_c_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_merge_r (.clk, .rst, .rail(merge_r), .dn(merge_r_dn), .count(merge_r_cnt), .bad(merge_r_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_fa_a (.clk, .rst, .hold(1'b0), .rail(fa_a), .up(fa_a_up), .done(fa_a_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_fa_b (.clk, .rst, .hold(1'b0), .rail(fa_b), .up(fa_b_up), .done(fa_b_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(12)) s_fa_ci (.clk, .rst, .hold(1'b0), .rail(fa_ci), .up(fa_ci_up), .done(fa_ci_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_fa_s (.clk, .rst, .rail(fa_s), .dn(fa_s_dn), .count(fa_s_cnt), .bad(fa_s_bad));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_fa_co (.clk, .rst, .rail(fa_co), .dn(fa_co_dn), .count(fa_co_cnt), .bad(fa_co_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_faf_a (.clk, .rst, .hold(1'b0), .rail(faf_a), .up(faf_a_up), .done(faf_a_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_faf_b (.clk, .rst, .hold(1'b0), .rail(faf_b), .up(faf_b_up), .done(faf_b_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(12)) s_faf_ci (.clk, .rst, .hold(1'b0), .rail(faf_ci), .up(faf_ci_up), .done(faf_ci_done));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_faf_s (.clk, .rst, .rail(faf_s), .dn(faf_s_dn), .count(faf_s_cnt), .bad(faf_s_bad));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_faf_co (.clk, .rst, .rail(faf_co), .dn(faf_co_dn), .count(faf_co_cnt), .bad(faf_co_bad));
  tb_st_snk #(.N(2), .MAXSTALL(4)) k_tx_r (.clk, .rst, .rail(tx_r), .dn(tx_r_dn), .count(tx_r_cnt), .bad(tx_r_bad));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(4)) s_rx_l (.clk, .rst, .hold(1'b0), .rail(rx_l), .up(rx_l_up), .done(rx_l_done));
  tb_st_src #(.N(2), .NTOK(NTOK), .MAXGAP(2)) s_dc_l (.clk, .rst, .hold(1'b0), .rail(dc_l), .up(dc_l_up), .done(dc_l_done));

  st_top dut (.clk, .rst,
    .buf_l_up, .buf_l,
    .buf_r_dn, .buf_r,
    .bufm2_l_up, .bufm2_l,
    .bufm2_r_dn, .bufm2_r,
    .buf4_l_up, .buf4_l,
    .buf4_r_dn, .buf4_r,
    .and2_a_up, .and2_a,
    .and2_b_up, .and2_b,
    .and2_c_dn, .and2_c,
    .andi_a_up, .andi_a,
    .andi_b_up, .andi_b,
    .andi_c_dn, .andi_c,
    .or2_a_up, .or2_a,
    .or2_b_up, .or2_b,
    .or2_c_dn, .or2_c,
    .ori_a_up, .ori_a,
    .ori_b_up, .ori_b,
    .ori_c_dn, .ori_c,
    .xor2_a_up, .xor2_a,
    .xor2_b_up, .xor2_b,
    .xor2_c_dn, .xor2_c,
    .fork_l_up, .fork_l,
    .fork_ra_dn, .fork_ra,
    .fork_rb_dn, .fork_rb,
    .ncm_la_up, .ncm_la,
    .ncm_lb_up, .ncm_lb,
    .ncm_r_dn, .ncm_r,
    .split_l_up, .split_l,
    .split_c_up, .split_c,
    .split_ra_dn, .split_ra,
    .split_rb_dn, .split_rb,
    .merge_la_up, .merge_la,
    .merge_lb_up, .merge_lb,
    .merge_c_up, .merge_c,
    .merge_r_dn, .merge_r,
    .fa_a_up, .fa_a,
    .fa_b_up, .fa_b,
    .fa_ci_up, .fa_ci,
    .fa_s_dn, .fa_s,
    .fa_co_dn, .fa_co,
    .faf_a_up, .faf_a,
    .faf_b_up, .faf_b,
    .faf_ci_up, .faf_ci,
    .faf_s_dn, .faf_s,
    .faf_co_dn, .faf_co,
    .tx_r_dn, .tx_r,
    .tx_l, .tx_le,
    .rx_l_up, .rx_l,
    .rx_r, .rx_re,
    .dc_l_up, .dc_l,
    .dc_consumed);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_buf_wait = 0, n_andi_early = 0, n_ori_early = 0, n_fa_early = 0;
  int n_fork_wait = 0, n_reset_clear = 0;
  dr_t andi_q, ori_q, fa_co_q;
  always @(posedge clk) if (!rst) begin
    andi_q <= andi_c; ori_q <= ori_c; fa_co_q <= fa_co;
    // a bit waiting in front of a buffer whose output is still occupied
    if (dr_full(buf_l) && dr_full(buf_r) && dut.u_buf.b == 1'b0) n_buf_wait++;
    if (andi_q == 2'b00 && andi_c != 2'b00 && !(dr_full(andi_a) && dr_full(andi_b))) n_andi_early++;
    if (ori_q == 2'b00 && ori_c != 2'b00 && !(dr_full(ori_a) && dr_full(ori_b))) n_ori_early++;
    if (fa_co_q == 2'b00 && fa_co != 2'b00 && !dr_full(fa_ci)) n_fa_early++;
    if (dr_full(fork_l) && (dr_full(fork_ra) != dr_full(fork_rb))) n_fork_wait++;
  end

  // ---------------- non-conditional merge: keep La/Lb exclusive ----------------
  int unsigned ncm_exp[$];
  int ncm_na = 0, ncm_nb = 0;
  dr_t ncm_la_q, ncm_lb_q;
  always @(posedge clk) begin
    ncm_la_q <= ncm_la; ncm_lb_q <= ncm_lb;
    if (rst) begin
      ncm_turn <= 1'b0; ncm_used <= 1'b0;
    end else begin
      if (ncm_la_q == 2'b00 && ncm_la != 2'b00) begin ncm_exp.push_back(32'(dr_dec(ncm_la))); ncm_na++; ncm_used <= 1'b1; end
      if (ncm_lb_q == 2'b00 && ncm_lb != 2'b00) begin ncm_exp.push_back(32'(dr_dec(ncm_lb))); ncm_nb++; ncm_used <= 1'b1; end
      if (ncm_used && ncm_la == 2'b00 && ncm_lb == 2'b00 && s_ncm_la.st == 0 && s_ncm_lb.st == 0) begin
        ncm_used <= 1'b0;
        ncm_turn <= (ncm_na >= NTOK) ? 1'b1 : (ncm_nb >= NTOK) ? 1'b0 : 1'($urandom_range(1, 0));
      end
    end
  end

  // ---------------- four-phase sender into the transmitter ----------------
  int unsigned tx_sent[$];
  initial begin
    tx_l = 2'b00;
    wait (!rst);
    for (int i = 0; i < NTOK; i++) begin
      automatic logic v = 1'($urandom_range(1, 0));
      while (!tx_le) @(posedge clk);
      repeat ($urandom_range(3, 0)) @(posedge clk);
      tx_l <= dr_enc(v);
      tx_sent.push_back(32'(v));
      @(posedge clk);
      while (tx_le) @(posedge clk);
      repeat ($urandom_range(3, 0)) @(posedge clk);
      tx_l <= 2'b00;
      @(posedge clk);
    end
  end

  // ---------------- four-phase receiver behind the receiver cell ----------------
  int unsigned rx_got[$];
  initial begin
    rx_re = 1'b1;
    wait (!rst);
    forever begin
      @(posedge clk);
      if (rx_r != 2'b00) begin
        rx_got.push_back(32'(dr_dec(rx_r)));
        repeat ($urandom_range(3, 0)) @(posedge clk);
        rx_re <= 1'b0;
        @(posedge clk);
        while (rx_r != 2'b00) @(posedge clk);
        repeat ($urandom_range(3, 0)) @(posedge clk);
        rx_re <= 1'b1;
        @(posedge clk);
      end
    end
  end

  int n_dc = 0;
  always @(posedge clk) if (!rst && dc_consumed) n_dc++;

  // ---------------- reference models ----------------
  function automatic int unsigned op(input string g, input int unsigned a, input int unsigned b);
    case (g)
      "and": return a & b;
      "or":  return a | b;
      default: return a ^ b;
    endcase
  endfunction

  task automatic check_gate(input string name, input string g, ref int unsigned qa[$], ref int unsigned qb[$],
                            ref int unsigned qc[$], input int unsigned cnt);
    check(cnt == NTOK, $sformatf("%s: %0d results", name, cnt));
    for (int i = 0; i < NTOK && i < int'(cnt); i++)
      check(qc[i] == op(g, qa[i], qb[i]), $sformatf("%s result %0d", name, i));
  endtask

  task automatic check_seq(input string name, ref int unsigned exp[$], ref int unsigned got[$], input int unsigned n);
    check(got.size() == n && exp.size() >= n, $sformatf("%s: %0d of %0d", name, got.size(), n));
    for (int i = 0; i < int'(n) && i < got.size() && i < exp.size(); i++)
      check(got[i] == exp[i], $sformatf("%s token %0d", name, i));
  endtask

  logic all_done;
  assign all_done = buf_r_cnt == NTOK && bufm2_r_cnt == NTOK && buf4_r_cnt == NTOK &&
                    and2_c_cnt == NTOK && andi_c_cnt == NTOK && or2_c_cnt == NTOK &&
                    ori_c_cnt == NTOK && xor2_c_cnt == NTOK && fork_ra_cnt == NTOK &&
                    fork_rb_cnt == NTOK && ncm_r_cnt == 2 * NTOK &&
                    split_ra_cnt + split_rb_cnt == NTOK && merge_r_cnt == NTOK &&
                    fa_s_cnt == NTOK && fa_co_cnt == NTOK && faf_s_cnt == NTOK &&
                    faf_co_cnt == NTOK && tx_r_cnt == NTOK &&
                    rx_got.size() == NTOK && dc_l_done;

  initial begin
    int unsigned ea[$], eb[$], em[$];
    int ia, ib;
    repeat (8) @(posedge clk);
    // reset must have cleared every single-track wire
    begin
      automatic bit clear = !dr_full(buf_l) && !dr_full(buf_r) && bufm2_l == 0 && bufm2_r == 0 &&
        buf4_l == 0 && buf4_r == 0 && and2_a == 0 && and2_b == 0 && and2_c == 0 &&
        andi_a == 0 && andi_b == 0 && andi_c == 0 && or2_a == 0 && or2_b == 0 && or2_c == 0 &&
        ori_a == 0 && ori_b == 0 && ori_c == 0 && xor2_a == 0 && xor2_b == 0 && xor2_c == 0 &&
        fork_l == 0 && fork_ra == 0 && fork_rb == 0 && ncm_la == 0 && ncm_lb == 0 && ncm_r == 0 &&
        split_l == 0 && split_c == 0 && split_ra == 0 && split_rb == 0 &&
        merge_la == 0 && merge_lb == 0 && merge_c == 0 && merge_r == 0 &&
        fa_a == 0 && fa_b == 0 && fa_ci == 0 && fa_s == 0 && fa_co == 0 &&
        faf_a == 0 && faf_b == 0 && faf_ci == 0 && faf_s == 0 && faf_co == 0 &&
        tx_r == 0 && rx_l == 0 && dc_l == 0;
      if (clear) n_reset_clear++;
      check(clear, "reset clears every wire");
    end
    rst = 0;
    wait (all_done || cyc > 100000);
    repeat (20) @(posedge clk);

    check_seq("buf", s_buf_l.sent_q, k_buf_r.got_q, NTOK);
    check_seq("buf_m2", s_bufm2_l.sent_q, k_bufm2_r.got_q, NTOK);
    check_seq("buf_1of4", s_buf4_l.sent_q, k_buf4_r.got_q, NTOK);
    check_gate("and", "and", s_and2_a.sent_q, s_and2_b.sent_q, k_and2_c.got_q, and2_c_cnt);
    check_gate("andi", "and", s_andi_a.sent_q, s_andi_b.sent_q, k_andi_c.got_q, andi_c_cnt);
    check_gate("or", "or", s_or2_a.sent_q, s_or2_b.sent_q, k_or2_c.got_q, or2_c_cnt);
    check_gate("ori", "or", s_ori_a.sent_q, s_ori_b.sent_q, k_ori_c.got_q, ori_c_cnt);
    check_gate("xor", "xor", s_xor2_a.sent_q, s_xor2_b.sent_q, k_xor2_c.got_q, xor2_c_cnt);
    check_seq("fork a", s_fork_l.sent_q, k_fork_ra.got_q, NTOK);
    check_seq("fork b", s_fork_l.sent_q, k_fork_rb.got_q, NTOK);
    check_seq("ncmerge", ncm_exp, k_ncm_r.got_q, 2 * NTOK);
    for (int i = 0; i < NTOK; i++)
      if (s_split_c.sent_q[i] == 0) ea.push_back(s_split_l.sent_q[i]); else eb.push_back(s_split_l.sent_q[i]);
    check_seq("split a", ea, k_split_ra.got_q, ea.size());
    check_seq("split b", eb, k_split_rb.got_q, eb.size());
    ia = 0; ib = 0;
    for (int i = 0; i < NTOK; i++)
      if (s_merge_c.sent_q[i] == 0) begin em.push_back(s_merge_la.sent_q[ia]); ia++; end
      else begin em.push_back(s_merge_lb.sent_q[ib]); ib++; end
    check_seq("merge", em, k_merge_r.got_q, NTOK);
    check(fa_s_cnt == NTOK && fa_co_cnt == NTOK, "adder result counts");
    for (int i = 0; i < NTOK && i < int'(fa_s_cnt) && i < int'(fa_co_cnt); i++) begin
      automatic int unsigned sum = s_fa_a.sent_q[i] + s_fa_b.sent_q[i] + s_fa_ci.sent_q[i];
      check(k_fa_s.got_q[i] == sum % 2 && k_fa_co.got_q[i] == sum / 2, $sformatf("adder %0d", i));
    end
    check(faf_s_cnt == NTOK && faf_co_cnt == NTOK, "fork adder result counts");
    for (int i = 0; i < NTOK && i < int'(faf_s_cnt) && i < int'(faf_co_cnt); i++) begin
      automatic int unsigned sum = s_faf_a.sent_q[i] + s_faf_b.sent_q[i] + s_faf_ci.sent_q[i];
      check(k_faf_s.got_q[i] == sum % 2 && k_faf_co.got_q[i] == sum / 2, $sformatf("fork adder %0d", i));
    end
    check_seq("tx", tx_sent, k_tx_r.got_q, NTOK);
    check_seq("rx", s_rx_l.sent_q, rx_got, NTOK);
    check(n_dc == NTOK, $sformatf("data consumer removed %0d", n_dc));
    check(buf_r_bad + bufm2_r_bad + buf4_r_bad + and2_c_bad + or2_c_bad + xor2_c_bad +
          andi_c_bad + ori_c_bad + fork_ra_bad + fork_rb_bad + ncm_r_bad + split_ra_bad +
          split_rb_bad + merge_r_bad + fa_s_bad + fa_co_bad + faf_s_bad + faf_co_bad +
          tx_r_bad == 0, "all outputs one-hot");

    // every mechanism must have happened
    $display("mechanisms: buffer back-pressure %0d, ANDi early %0d, ORi early %0d, early carry %0d,",
             n_buf_wait, n_andi_early, n_ori_early, n_fa_early);
    $display("  fork wait %0d, split a/b %0d/%0d, merge a/b %0d/%0d, ncmerge a/b %0d/%0d,",
             n_fork_wait, ea.size(), eb.size(), ia, ib, ncm_na, ncm_nb);
    $display("  tx handshakes %0d, rx handshakes %0d, consumed %0d, reset clear %0d",
             tx_sent.size(), rx_got.size(), n_dc, n_reset_clear);
    check(n_buf_wait > 0, "buffer back-pressure happened");
    check(n_andi_early > 0, "ANDi early zero happened");
    check(n_ori_early > 0, "ORi early one happened");
    check(n_fa_early > 0, "adder early carry happened");
    check(n_fork_wait > 0, "fork waited for a busy output");
    check(ea.size() > 0 && eb.size() > 0, "split used both routes");
    check(ia > 0 && ib > 0, "merge chose both inputs");
    check(ncm_na > 0 && ncm_nb > 0, "non-conditional merge used both inputs");
    check(tx_sent.size() > 0 && rx_got.size() > 0 && n_dc > 0, "interfaces and consumer used");
    check(n_reset_clear > 0, "reset cleared the wires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
