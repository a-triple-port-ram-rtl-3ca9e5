// tr_outmux: the three 2:1 output multiplexers of the TR commutator.
//
// O2 takes the commutator input word while c1 = 1 and the RAM chain output D
// otherwise; O3 takes port A (c2 = 1) or port E; O4 takes port B (c3 = 1)
// or port F.  O1 needs no multiplexer: it is port C directly.  Sources and
// select lines are those of the TR commutator drawing; the polarity (1 picks
// the first source) follows from the select table of the general commutator
// held against the timing diagrams.  Purely combinational.
module tr_outmux
  import tr_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  sel_t         sel,
  input  logic [W-1:0] din,  // commutator input word
  input  logic [W-1:0] a,    // TM0 port 1
  input  logic [W-1:0] b,    // TM0 port 2 after its register
  input  logic [W-1:0] d,    // TM1 port 2 after its register
  input  logic [W-1:0] e,    // TM2 port 1
  input  logic [W-1:0] f,    // TM2 port 2 after its register
  output logic [W-1:0] o2,
  output logic [W-1:0] o3,
  output logic [W-1:0] o4
);

  always_comb begin
    o2 = sel.c1 ? din : d;
    o3 = sel.c2 ? a   : e;
    o4 = sel.c3 ? b   : f;
  end

endmodule
