// full_adder: one-bit full adder, the cell of the ripple carry adder. s = a ^ b ^ ci and co is the majority of
// the three inputs. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
