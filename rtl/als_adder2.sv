// als_adder2: 2-bit adder variants produced by two-level approximate logic
// synthesis under an error-magnitude limit M = 1.
//
// Inputs a = {a1,a0}, b = {b1,b0}; outputs carry c and sum s = {S1,S0}, so
// the result is the 3-bit value {c,S1,S0}. VARIANT selects:
//   ALS_EXACT  the exact adder (sum-of-products form);
//   ALS_F1     magnitude constraint only: S0 is constant 1, the upper bits
//              ignore a0/b0; every output is within 1 of the true sum;
//   ALS_F1R2   additionally at most 2 of the 16 input pairs in error;
//   ALS_F1R1   at most 1 of the 16 input pairs in error.
// The sum-of-products equations are those reported for these variants; only
// their packaging into one module is this design's. Combinational.
module als_adder2
  import approx_pkg::*;
#(
  parameter als_variant_e VARIANT = ALS_F1
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       c,
  output logic [1:0] s
);

  logic a1, a0, b1, b0;
  assign {a1, a0} = a;
  assign {b1, b0} = b;

  always_comb begin
    unique case (VARIANT)
      ALS_EXACT: begin
        c    = (a0 & b1 & b0) | (a1 & a0 & b0) | (a1 & b1);
        s[1] = (~a1 & a0 & ~b1 & b0) | (a1 & a0 & b1 & b0) | (a1 & ~b1 & ~b0)
             | (~a1 & b1 & ~b0) | (a1 & ~a0 & ~b1) | (~a1 & ~a0 & b1);
        s[0] = (a0 & ~b0) | (~a0 & b0);
      end
      ALS_F1: begin
        c    = a1 & b1;
        s[1] = (a1 & ~b1) | (~a1 & b1);
        s[0] = 1'b1;
      end
      ALS_F1R2: begin
        c    = a1 & b1;
        s[1] = (a1 & ~b1) | (~a1 & b1) | (a0 & b0);
        s[0] = (a1 & ~b1 & b0) | (~a1 & b1 & b0) | (a0 & ~b0) | (~a0 & b0);
      end
      default: begin // ALS_F1R1
        c    = (a0 & b1 & b0) | (a1 & b1);
        s[1] = (~a1 & b1 & ~b0) | (~a1 & ~a0 & b1) | (a0 & ~b1 & b0)
             | (a1 & a0 & b0) | (a1 & ~b1);
        s[0] = (a1 & ~b1 & b0) | (a0 & ~b0) | (~a0 & b0);
      end
    endcase
  end

endmodule
