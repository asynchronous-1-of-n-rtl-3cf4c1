// st_top: the single-track 1-of-n cell library, every cell side by side.
//
// The cells are independent building blocks, so this top places one of
// each next to the others, each with its own single-track wires (st_wire)
// on every channel, and brings every channel out. The cells only share
// the clock (one period = one gate delay) and Reset.
// For a single-track channel <cell>_<ch> that is a cell input, the port
// <cell>_<ch>_up is the outside sender's pull-up and <cell>_<ch> the wire
// level. For a channel that is a cell output, <cell>_<ch>_dn is the
// outside receiver's pull-down and <cell>_<ch> the wire level. The
// four-phase sides of the transmitter (tx_l, tx_le) and receiver (rx_r,
// rx_re) and the consume strobe of the data consumer are plain ports.
// Cells: buf (dual-rail buffer), bufm2 (buffer with 2 gate-delay margin),
// buf4 (1-of-4 buffer), and2/or2/xor2 (logic gates), andi/ori (gates with
// early output), fork, ncm (non-conditional merge), split, merge, fa (full
// adder), faf (full adder built from forks, a three-input XOR and a
// three-input majority gate), tx (four-phase to single-track), rx
// (single-track to four-phase), dc (data consumer). Placing the cells side by side, rather than in a
// larger circuit, is this top's choice: the cells are described as a
// library, not as one circuit.
module st_top
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t buf_l_up,
  output dr_t buf_l,
  input  dr_t buf_r_dn,
  output dr_t buf_r,
  input  dr_t bufm2_l_up,
  output dr_t bufm2_l,
  input  dr_t bufm2_r_dn,
  output dr_t bufm2_r,
  input  logic [3:0] buf4_l_up,
  output logic [3:0] buf4_l,
  input  logic [3:0] buf4_r_dn,
  output logic [3:0] buf4_r,
  input  dr_t and2_a_up,
  output dr_t and2_a,
  input  dr_t and2_b_up,
  output dr_t and2_b,
  input  dr_t and2_c_dn,
  output dr_t and2_c,
  input  dr_t andi_a_up,
  output dr_t andi_a,
  input  dr_t andi_b_up,
  output dr_t andi_b,
  input  dr_t andi_c_dn,
  output dr_t andi_c,
  input  dr_t or2_a_up,
  output dr_t or2_a,
  input  dr_t or2_b_up,
  output dr_t or2_b,
  input  dr_t or2_c_dn,
  output dr_t or2_c,
  input  dr_t ori_a_up,
  output dr_t ori_a,
  input  dr_t ori_b_up,
  output dr_t ori_b,
  input  dr_t ori_c_dn,
  output dr_t ori_c,
  input  dr_t xor2_a_up,
  output dr_t xor2_a,
  input  dr_t xor2_b_up,
  output dr_t xor2_b,
  input  dr_t xor2_c_dn,
  output dr_t xor2_c,
  input  dr_t fork_l_up,
  output dr_t fork_l,
  input  dr_t fork_ra_dn,
  output dr_t fork_ra,
  input  dr_t fork_rb_dn,
  output dr_t fork_rb,
  input  dr_t ncm_la_up,
  output dr_t ncm_la,
  input  dr_t ncm_lb_up,
  output dr_t ncm_lb,
  input  dr_t ncm_r_dn,
  output dr_t ncm_r,
  input  dr_t split_l_up,
  output dr_t split_l,
  input  dr_t split_c_up,
  output dr_t split_c,
  input  dr_t split_ra_dn,
  output dr_t split_ra,
  input  dr_t split_rb_dn,
  output dr_t split_rb,
  input  dr_t merge_la_up,
  output dr_t merge_la,
  input  dr_t merge_lb_up,
  output dr_t merge_lb,
  input  dr_t merge_c_up,
  output dr_t merge_c,
  input  dr_t merge_r_dn,
  output dr_t merge_r,
  input  dr_t fa_a_up,
  output dr_t fa_a,
  input  dr_t fa_b_up,
  output dr_t fa_b,
  input  dr_t fa_ci_up,
  output dr_t fa_ci,
  input  dr_t fa_s_dn,
  output dr_t fa_s,
  input  dr_t fa_co_dn,
  output dr_t fa_co,
  input  dr_t faf_a_up,
  output dr_t faf_a,
  input  dr_t faf_b_up,
  output dr_t faf_b,
  input  dr_t faf_ci_up,
  output dr_t faf_ci,
  input  dr_t faf_s_dn,
  output dr_t faf_s,
  input  dr_t faf_co_dn,
  output dr_t faf_co,
  input  dr_t tx_l,
  output logic tx_le,
  input  dr_t tx_r_dn,
  output dr_t tx_r,
  input  dr_t rx_l_up,
  output dr_t rx_l,
  output dr_t rx_r,
  input  logic rx_re,
  input  dr_t dc_l_up,
  output dr_t dc_l,
  output logic dc_consumed
);

  // ---- stfb_buf ----
  dr_t buf_l_dn_i;
  st_wire #(.N(2)) u_w_buf_l (.clk, .rst, .up(buf_l_up), .dn(buf_l_dn_i), .rail(buf_l));
  dr_t buf_r_up_i;
  st_wire #(.N(2)) u_w_buf_r (.clk, .rst, .up(buf_r_up_i), .dn(buf_r_dn), .rail(buf_r));
  stfb_buf u_buf (.clk, .rst, .l(buf_l), .l_dn(buf_l_dn_i), .r(buf_r), .r_up(buf_r_up_i));

  // ---- stfb_buf_m2 ----
  dr_t bufm2_l_dn_i;
  st_wire #(.N(2)) u_w_bufm2_l (.clk, .rst, .up(bufm2_l_up), .dn(bufm2_l_dn_i), .rail(bufm2_l));
  dr_t bufm2_r_up_i;
  st_wire #(.N(2)) u_w_bufm2_r (.clk, .rst, .up(bufm2_r_up_i), .dn(bufm2_r_dn), .rail(bufm2_r));
  stfb_buf_m2 u_bufm2 (.clk, .rst, .l(bufm2_l), .l_dn(bufm2_l_dn_i), .r(bufm2_r), .r_up(bufm2_r_up_i));

  // ---- stfb_buf_1ofn ----
  logic [3:0] buf4_l_dn_i;
  st_wire #(.N(4)) u_w_buf4_l (.clk, .rst, .up(buf4_l_up), .dn(buf4_l_dn_i), .rail(buf4_l));
  logic [3:0] buf4_r_up_i;
  st_wire #(.N(4)) u_w_buf4_r (.clk, .rst, .up(buf4_r_up_i), .dn(buf4_r_dn), .rail(buf4_r));
  stfb_buf_1ofn u_buf4 (.clk, .rst, .l(buf4_l), .l_dn(buf4_l_dn_i), .r(buf4_r), .r_up(buf4_r_up_i));

  // ---- stfb_and ----
  dr_t and2_a_dn_i;
  st_wire #(.N(2)) u_w_and2_a (.clk, .rst, .up(and2_a_up), .dn(and2_a_dn_i), .rail(and2_a));
  dr_t and2_b_dn_i;
  st_wire #(.N(2)) u_w_and2_b (.clk, .rst, .up(and2_b_up), .dn(and2_b_dn_i), .rail(and2_b));
  dr_t and2_c_up_i;
  st_wire #(.N(2)) u_w_and2_c (.clk, .rst, .up(and2_c_up_i), .dn(and2_c_dn), .rail(and2_c));
  stfb_and u_and2 (.clk, .rst, .a(and2_a), .a_dn(and2_a_dn_i), .b(and2_b), .b_dn(and2_b_dn_i), .c(and2_c), .c_up(and2_c_up_i));

  // ---- stfb_andi ----
  dr_t andi_a_dn_i;
  st_wire #(.N(2)) u_w_andi_a (.clk, .rst, .up(andi_a_up), .dn(andi_a_dn_i), .rail(andi_a));
  dr_t andi_b_dn_i;
  st_wire #(.N(2)) u_w_andi_b (.clk, .rst, .up(andi_b_up), .dn(andi_b_dn_i), .rail(andi_b));
  dr_t andi_c_up_i;
  st_wire #(.N(2)) u_w_andi_c (.clk, .rst, .up(andi_c_up_i), .dn(andi_c_dn), .rail(andi_c));
  stfb_andi u_andi (.clk, .rst, .a(andi_a), .a_dn(andi_a_dn_i), .b(andi_b), .b_dn(andi_b_dn_i), .c(andi_c), .c_up(andi_c_up_i));

  // ---- stfb_or ----
  dr_t or2_a_dn_i;
  st_wire #(.N(2)) u_w_or2_a (.clk, .rst, .up(or2_a_up), .dn(or2_a_dn_i), .rail(or2_a));
  dr_t or2_b_dn_i;
  st_wire #(.N(2)) u_w_or2_b (.clk, .rst, .up(or2_b_up), .dn(or2_b_dn_i), .rail(or2_b));
  dr_t or2_c_up_i;
  st_wire #(.N(2)) u_w_or2_c (.clk, .rst, .up(or2_c_up_i), .dn(or2_c_dn), .rail(or2_c));
  stfb_or u_or2 (.clk, .rst, .a(or2_a), .a_dn(or2_a_dn_i), .b(or2_b), .b_dn(or2_b_dn_i), .c(or2_c), .c_up(or2_c_up_i));

  // ---- stfb_ori ----
  dr_t ori_a_dn_i;
  st_wire #(.N(2)) u_w_ori_a (.clk, .rst, .up(ori_a_up), .dn(ori_a_dn_i), .rail(ori_a));
  dr_t ori_b_dn_i;
  st_wire #(.N(2)) u_w_ori_b (.clk, .rst, .up(ori_b_up), .dn(ori_b_dn_i), .rail(ori_b));
  dr_t ori_c_up_i;
  st_wire #(.N(2)) u_w_ori_c (.clk, .rst, .up(ori_c_up_i), .dn(ori_c_dn), .rail(ori_c));
  stfb_ori u_ori (.clk, .rst, .a(ori_a), .a_dn(ori_a_dn_i), .b(ori_b), .b_dn(ori_b_dn_i), .c(ori_c), .c_up(ori_c_up_i));

  // ---- stfb_xor ----
  dr_t xor2_a_dn_i;
  st_wire #(.N(2)) u_w_xor2_a (.clk, .rst, .up(xor2_a_up), .dn(xor2_a_dn_i), .rail(xor2_a));
  dr_t xor2_b_dn_i;
  st_wire #(.N(2)) u_w_xor2_b (.clk, .rst, .up(xor2_b_up), .dn(xor2_b_dn_i), .rail(xor2_b));
  dr_t xor2_c_up_i;
  st_wire #(.N(2)) u_w_xor2_c (.clk, .rst, .up(xor2_c_up_i), .dn(xor2_c_dn), .rail(xor2_c));
  stfb_xor u_xor2 (.clk, .rst, .a(xor2_a), .a_dn(xor2_a_dn_i), .b(xor2_b), .b_dn(xor2_b_dn_i), .c(xor2_c), .c_up(xor2_c_up_i));

  // ---- stfb_fork ----
  dr_t fork_l_dn_i;
  st_wire #(.N(2)) u_w_fork_l (.clk, .rst, .up(fork_l_up), .dn(fork_l_dn_i), .rail(fork_l));
  dr_t fork_ra_up_i;
  st_wire #(.N(2)) u_w_fork_ra (.clk, .rst, .up(fork_ra_up_i), .dn(fork_ra_dn), .rail(fork_ra));
  dr_t fork_rb_up_i;
  st_wire #(.N(2)) u_w_fork_rb (.clk, .rst, .up(fork_rb_up_i), .dn(fork_rb_dn), .rail(fork_rb));
  stfb_fork u_fork (.clk, .rst, .l(fork_l), .l_dn(fork_l_dn_i), .ra(fork_ra), .ra_up(fork_ra_up_i), .rb(fork_rb), .rb_up(fork_rb_up_i));

  // ---- stfb_ncmerge ----
  dr_t ncm_la_dn_i;
  st_wire #(.N(2)) u_w_ncm_la (.clk, .rst, .up(ncm_la_up), .dn(ncm_la_dn_i), .rail(ncm_la));
  dr_t ncm_lb_dn_i;
  st_wire #(.N(2)) u_w_ncm_lb (.clk, .rst, .up(ncm_lb_up), .dn(ncm_lb_dn_i), .rail(ncm_lb));
  dr_t ncm_r_up_i;
  st_wire #(.N(2)) u_w_ncm_r (.clk, .rst, .up(ncm_r_up_i), .dn(ncm_r_dn), .rail(ncm_r));
  stfb_ncmerge u_ncm (.clk, .rst, .la(ncm_la), .la_dn(ncm_la_dn_i), .lb(ncm_lb), .lb_dn(ncm_lb_dn_i), .r(ncm_r), .r_up(ncm_r_up_i));

  // ---- stfb_split ----
  dr_t split_l_dn_i;
  st_wire #(.N(2)) u_w_split_l (.clk, .rst, .up(split_l_up), .dn(split_l_dn_i), .rail(split_l));
  dr_t split_c_dn_i;
  st_wire #(.N(2)) u_w_split_c (.clk, .rst, .up(split_c_up), .dn(split_c_dn_i), .rail(split_c));
  dr_t split_ra_up_i;
  st_wire #(.N(2)) u_w_split_ra (.clk, .rst, .up(split_ra_up_i), .dn(split_ra_dn), .rail(split_ra));
  dr_t split_rb_up_i;
  st_wire #(.N(2)) u_w_split_rb (.clk, .rst, .up(split_rb_up_i), .dn(split_rb_dn), .rail(split_rb));
  stfb_split u_split (.clk, .rst, .l(split_l), .l_dn(split_l_dn_i), .c(split_c), .c_dn(split_c_dn_i), .ra(split_ra), .ra_up(split_ra_up_i), .rb(split_rb), .rb_up(split_rb_up_i));

  // ---- stfb_merge ----
  dr_t merge_la_dn_i;
  st_wire #(.N(2)) u_w_merge_la (.clk, .rst, .up(merge_la_up), .dn(merge_la_dn_i), .rail(merge_la));
  dr_t merge_lb_dn_i;
  st_wire #(.N(2)) u_w_merge_lb (.clk, .rst, .up(merge_lb_up), .dn(merge_lb_dn_i), .rail(merge_lb));
  dr_t merge_c_dn_i;
  st_wire #(.N(2)) u_w_merge_c (.clk, .rst, .up(merge_c_up), .dn(merge_c_dn_i), .rail(merge_c));
  dr_t merge_r_up_i;
  st_wire #(.N(2)) u_w_merge_r (.clk, .rst, .up(merge_r_up_i), .dn(merge_r_dn), .rail(merge_r));
  stfb_merge u_merge (.clk, .rst, .la(merge_la), .la_dn(merge_la_dn_i), .lb(merge_lb), .lb_dn(merge_lb_dn_i), .c(merge_c), .c_dn(merge_c_dn_i), .r(merge_r), .r_up(merge_r_up_i));

  // ---- stfb_fa ----
  dr_t fa_a_dn_i;
  st_wire #(.N(2)) u_w_fa_a (.clk, .rst, .up(fa_a_up), .dn(fa_a_dn_i), .rail(fa_a));
  dr_t fa_b_dn_i;
  st_wire #(.N(2)) u_w_fa_b (.clk, .rst, .up(fa_b_up), .dn(fa_b_dn_i), .rail(fa_b));
  dr_t fa_ci_dn_i;
  st_wire #(.N(2)) u_w_fa_ci (.clk, .rst, .up(fa_ci_up), .dn(fa_ci_dn_i), .rail(fa_ci));
  dr_t fa_s_up_i;
  st_wire #(.N(2)) u_w_fa_s (.clk, .rst, .up(fa_s_up_i), .dn(fa_s_dn), .rail(fa_s));
  dr_t fa_co_up_i;
  st_wire #(.N(2)) u_w_fa_co (.clk, .rst, .up(fa_co_up_i), .dn(fa_co_dn), .rail(fa_co));
  stfb_fa u_fa (.clk, .rst, .a(fa_a), .a_dn(fa_a_dn_i), .b(fa_b), .b_dn(fa_b_dn_i), .ci(fa_ci), .ci_dn(fa_ci_dn_i), .s(fa_s), .s_up(fa_s_up_i), .co(fa_co), .co_up(fa_co_up_i));

  // ---- stfb_fa_fork ----
  dr_t faf_a_dn_i;
  st_wire #(.N(2)) u_w_faf_a (.clk, .rst, .up(faf_a_up), .dn(faf_a_dn_i), .rail(faf_a));
  dr_t faf_b_dn_i;
  st_wire #(.N(2)) u_w_faf_b (.clk, .rst, .up(faf_b_up), .dn(faf_b_dn_i), .rail(faf_b));
  dr_t faf_ci_dn_i;
  st_wire #(.N(2)) u_w_faf_ci (.clk, .rst, .up(faf_ci_up), .dn(faf_ci_dn_i), .rail(faf_ci));
  dr_t faf_s_up_i;
  st_wire #(.N(2)) u_w_faf_s (.clk, .rst, .up(faf_s_up_i), .dn(faf_s_dn), .rail(faf_s));
  dr_t faf_co_up_i;
  st_wire #(.N(2)) u_w_faf_co (.clk, .rst, .up(faf_co_up_i), .dn(faf_co_dn), .rail(faf_co));
  stfb_fa_fork u_faf (.clk, .rst, .a(faf_a), .a_dn(faf_a_dn_i), .b(faf_b), .b_dn(faf_b_dn_i), .ci(faf_ci), .ci_dn(faf_ci_dn_i), .s(faf_s), .s_up(faf_s_up_i), .co(faf_co), .co_up(faf_co_up_i));

  // ---- stfb_tx ----
  dr_t tx_r_up_i;
  st_wire #(.N(2)) u_w_tx_r (.clk, .rst, .up(tx_r_up_i), .dn(tx_r_dn), .rail(tx_r));
  stfb_tx u_tx (.clk, .rst, .l(tx_l), .le(tx_le), .r(tx_r), .r_up(tx_r_up_i));

  // ---- stfb_rx ----
  dr_t rx_l_dn_i;
  st_wire #(.N(2)) u_w_rx_l (.clk, .rst, .up(rx_l_up), .dn(rx_l_dn_i), .rail(rx_l));
  stfb_rx u_rx (.clk, .rst, .l(rx_l), .l_dn(rx_l_dn_i), .r(rx_r), .re(rx_re));

  // ---- stfb_dc ----
  dr_t dc_l_dn_i;
  st_wire #(.N(2)) u_w_dc_l (.clk, .rst, .up(dc_l_up), .dn(dc_l_dn_i), .rail(dc_l));
  stfb_dc u_dc (.clk, .rst, .l(dc_l), .l_dn(dc_l_dn_i), .consumed(dc_consumed));
endmodule
