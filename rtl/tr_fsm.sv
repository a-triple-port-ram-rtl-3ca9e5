// tr_fsm: the state machine of the TR commutator's CONTROL block.
//
// The state is a free-running word-slot counter cnt (0 .. 4N-1) that counts
// the slot s = N*m + q of the frame the commutator currently outputs.  From
// it the FSM derives, combinationally:
//   a1  = cnt mod 2N   write address of all three RAMs (circular buffer)
//   a2  = a1 + 1       read address of the FIFO ports (TM0, TM1 port 2): the
//                      oldest word, written 2N-1 slots ago; with the register
//                      behind the port this gives a 2N-word FIFO
//   a3  = a1 - N       read address of TM1 port 1 (port C): the word written
//                      N slots ago
//   cs  = (m == 1) || (m == 2)
//                      chip select of TM2: only the words written while
//                      m = 1 or 2 are ever read, so writes are switched off
//                      while m = 0 and m = 3
//   m, q, sel          m_t, q_t and the multiplexer selects c1..c3
// Addresses are taken modulo 2N (N must be a power of two).
//
// The words a RAM stage receives are 3N slots ahead of the slot it outputs,
// so reset loads cnt = N: the first word after reset is word 0 of a frame
// and the first output frame begins 3N cycles later, which is when out_valid
// rises and stays high.  The reset value, the synchronous active-low reset
// and out_valid are this design's choices; the offsets of a2 and a3, the
// select table and the chip-select phases follow the commutator description.
module tr_fsm
  import tr_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned AW = idx_w(2*N),
  localparam int unsigned CW = idx_w(4*N),
  localparam int unsigned QW = idx_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] cnt,
  output logic [AW-1:0] a1,
  output logic [AW-1:0] a2,
  output logic [AW-1:0] a3,
  output logic          cs,
  output logic [1:0]    m,
  output logic [QW-1:0] q,
  output sel_t          sel,
  output logic          out_valid
);

  localparam logic [CW-1:0] CNT_LAST  = CW'(4*N - 1);
  localparam logic [CW-1:0] CNT_RESET = CW'(N);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= CNT_RESET;
      out_valid <= 1'b0;
    end else begin
      cnt <= (cnt == CNT_LAST) ? '0 : cnt + 1'b1;
      if (cnt == CNT_LAST) out_valid <= 1'b1;
    end
  end

  always_comb begin
    a1  = AW'(cnt);
    a2  = a1 + AW'(1);
    a3  = a1 - AW'(N);
    m   = 2'(cnt / CW'(N));
    q   = QW'(cnt % CW'(N));
    cs  = (m == 2'd1) || (m == 2'd2);
    sel = sel_of_m(m);
  end

endmodule
