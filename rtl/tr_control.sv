// tr_control: CONTROL block of the TR commutator, the FSM and the address
// ROM together.
//
// The FSM (tr_fsm) holds the word-slot counter and produces the addresses
// of the always-used ports (a1 write, a2 FIFO read, a3 delayed read), the
// TM2 chip select, m, q and the multiplexer selects.  The ROM (tr_rom),
// addressed by the same counter, produces the read addresses aa, ae, af of
// the ports that are used only in some phases of m.  All outputs are
// combinational functions of the counter register, so they change only at
// the clock edge.  The split into FSM and ROM follows the commutator
// drawing.
module tr_control
  import tr_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned AW = idx_w(2*N),
  localparam int unsigned QW = idx_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] a1,
  output logic [AW-1:0] a2,
  output logic [AW-1:0] a3,
  output logic          cs,
  output logic [AW-1:0] aa,
  output logic [AW-1:0] ae,
  output logic [AW-1:0] af,
  output logic [1:0]    m,
  output logic [QW-1:0] q,
  output sel_t          sel,
  output logic          out_valid
);

  localparam int unsigned CW = idx_w(4*N);

  logic [CW-1:0] cnt;

  tr_fsm #(.N(N)) u_fsm (
    .clk, .rst_n, .cnt, .a1, .a2, .a3, .cs, .m, .q, .sel, .out_valid
  );

  tr_rom #(.N(N)) u_rom (
    .cnt, .aa, .ae, .af
  );

endmodule
