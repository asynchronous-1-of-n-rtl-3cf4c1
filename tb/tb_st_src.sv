// tb_st_src: test sender for a 1-of-N single-track channel.
//
// Sends NTOK random values, each after a random idle gap of 0..MAXGAP
// cycles. Once it sees the channel blank it waits one cycle (as a cell's
// completion detector does) and then pulls the chosen rail high until it
// sees the rail high. IDLE doubles as "wait for blank". Every value sent is appended to sent_q in order.
// When HOLD is high no new value is started.
module tb_st_src #(
  parameter int unsigned N      = 2,
  parameter int unsigned NTOK   = 16,
  parameter int unsigned MAXGAP = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         hold,
  input  logic [N-1:0] rail,
  output logic [N-1:0] up,
  output logic         done
);

  typedef enum logic [1:0] {IDLE, GAP, DRIVE} st_e;
  st_e         st;
  int unsigned gap, cnt, val;
  int unsigned sent_q[$];

  always_ff @(posedge clk) begin
    if (rst) begin
      st  <= IDLE;
      cnt <= 0;
      gap <= 0;
      val <= 0;
    end else begin
      case (st)
        IDLE: if (rail == '0 && cnt < NTOK && !hold) begin   // blank seen
          gap <= $urandom_range(MAXGAP, 0);
          val <= $urandom_range(N - 1, 0);
          st  <= GAP;
        end
        GAP: if (gap == 0) st <= DRIVE; else gap <= gap - 1;
        DRIVE: if (rail != '0) begin
          sent_q.push_back(val);
          cnt <= cnt + 1;
          st  <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    up = '0;
    if (st == DRIVE) up[val] = 1'b1;
  end

  assign done = (cnt == NTOK) && (st == IDLE);

endmodule
