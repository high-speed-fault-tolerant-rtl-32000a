// tmr_vote: bitwise 2-of-3 majority voter for triple modular redundancy.
//
// Each output bit is the value held by at least two of the three copies a, b
// and c, so any fault confined to one copy is outvoted. mismatch is raised
// when the copies do not all agree, which reports that a copy was faulty.
// Purely combinational. The design specification protects its adders and its
// detection/correction logic with TMR; the mismatch flag is this
// implementation's addition.
module tmr_vote #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);

  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end

endmodule
