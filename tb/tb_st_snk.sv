// tb_st_snk: test receiver for a 1-of-N single-track channel.
//
// Behaves like a cell's input stage: on seeing data it waits a random
// 0..MAXSTALL cycles (back-pressure), records the value, and one cycle
// later pulls all rails low until one cycle after the channel is blank.
// With no stall this is exactly the timing of a buffer's acknowledge.
// Values are appended to got_q, their arrival cycle to t_q. bad counts
// cycles with more than one rail high.
module tb_st_snk #(
  parameter int unsigned N        = 2,
  parameter int unsigned MAXSTALL = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] rail,
  output logic [N-1:0] dn,
  output int unsigned  count,
  output int unsigned  bad
);

  logic        taken, ack, armed;
  int unsigned wcnt, cyc;
  int unsigned got_q[$];
  int unsigned t_q[$];

  function automatic int unsigned idx(input logic [N-1:0] r);
    int unsigned k = 0;
    for (int i = 0; i < N; i++) if (r[i]) k = i;
    return k;
  endfunction

  always_ff @(posedge clk) begin
    int unsigned w;
    cyc <= cyc + 1;
    if (rst) begin
      taken <= 1'b0;
      ack   <= 1'b1;
      armed <= 1'b0;
      wcnt  <= 0;
      count <= 0;
      bad   <= 0;
      cyc   <= 0;
    end else begin
      ack <= taken;
      if ($countones(rail) > 1) bad <= bad + 1;
      if (!taken && rail != '0) begin
        if (!armed) t_q.push_back(cyc);
        w = armed ? wcnt : $urandom_range(MAXSTALL, 0);
        if (w == 0) begin
          got_q.push_back(idx(rail));
          count <= count + 1;
          taken <= 1'b1;
          armed <= 1'b0;
        end else begin
          wcnt  <= w - 1;
          armed <= 1'b1;
        end
      end
      if (taken && rail == '0) taken <= 1'b0;
    end
  end

  assign dn = {N{ack}};

endmodule
