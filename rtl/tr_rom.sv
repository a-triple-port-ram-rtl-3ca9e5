// tr_rom: the address ROM of the TR commutator's CONTROL block.
//
// Indexed by the slot counter cnt (0 .. 4N-1) of the FSM, it gives the read
// addresses of the three RAM ports that are needed only part of the time:
//   aa  TM0 port 1 (A, feeds O3 while m = 0, 1)
//   ae  TM2 port 1 (E, feeds O3 while m = 2, 3)
//   af  TM2 port 2 (F, feeds O4 through a register while m = 3)
// While a port is in use its address tracks the data exactly like the FSM
// addresses (aa = ae = a1 - N, af = a1 + 1; af starts one slot early because
// of the register behind port F).  While the port is not in use its address
// stays at the last address used, so the port output does not switch until
// that location is rewritten.  With TM2 written only while m = 1 or 2, the
// held location of port E is never rewritten and E stays constant through
// its whole idle period; A and F switch once.
//
// The ROM contents are not printed in the description; the rule above is
// this design's choice for "keep unused outputs at their previous values".
// The table is computed at elaboration:
//   m = c / N, a1 = c mod 2N
//   aa(c) = m <= 1           ? (a1 + N) mod 2N : N - 1
//   ae(c) = m >= 2           ? (a1 + N) mod 2N : N - 1
//   af(c) = 3N-1 <= c <= 4N-2 ? (a1 + 1) mod 2N : 2N - 1
// The lookup is combinational.
module tr_rom
  import tr_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned AW = idx_w(2*N),
  localparam int unsigned CW = idx_w(4*N)
) (
  input  logic [CW-1:0] cnt,
  output logic [AW-1:0] aa,
  output logic [AW-1:0] ae,
  output logic [AW-1:0] af
);

  typedef struct packed {
    logic [AW-1:0] aa;
    logic [AW-1:0] ae;
    logic [AW-1:0] af;
  } word_t;

  typedef word_t [4*N-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int unsigned c = 0; c < 4 * N; c++) begin
      int unsigned m, a1;
      m  = c / N;
      a1 = c % (2 * N);
      t[c].aa = AW'((m <= 1) ? (a1 + N) % (2 * N) : N - 1);
      t[c].ae = AW'((m >= 2) ? (a1 + N) % (2 * N) : N - 1);
      t[c].af = AW'((c + 1 >= 3 * N && c + 2 <= 4 * N) ? (a1 + 1) % (2 * N) : 2 * N - 1);
    end
    return t;
  endfunction

  localparam table_t ROM = build_table();

  always_comb begin
    aa = ROM[cnt].aa;
    ae = ROM[cnt].ae;
    af = ROM[cnt].af;
  end

endmodule
