// tpram: triple port RAM (TM) of the TR commutator.
//
// DEPTH words of W bits with one write port and two independent read ports,
// the three ports of one RAM in the commutator.  The commutator uses
// DEPTH = 2N, twice the word separation N of its FFT stage, so that one RAM
// and one register replace two N-word FIFOs.
//
// Timing: the write is synchronous; it happens at the rising clock edge when
// the chip select cs is high, so cs = 0 leaves the array untouched and saves
// the write activity.  Both read ports are asynchronous: o1 = mem[ra1] and
// o2 = mem[ra2] within the same cycle, and a read shows the old word of a
// location that is written at the end of the same cycle.  A read port whose
// address does not change, of a location that is not written, does not
// switch.  The asynchronous read (a register-file style macro) and the use
// of cs only as a write enable are choices of this design; the RAM contents
// are not reset.
//
// Ports: clk, cs, wa, din (write port); ra1 -> o1, ra2 -> o2 (read ports).
module tpram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          cs,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  o1,
  output logic [W-1:0]  o2
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs) mem[wa] <= din;
  end

  assign o1 = mem[ra1];
  assign o2 = mem[ra2];

endmodule
