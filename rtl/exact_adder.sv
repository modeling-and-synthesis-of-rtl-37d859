// exact_adder: exact W-bit two-operand adder with carry-in and carry-out.
//
// It is the "regular adder" that forms the MSB segment of an AFIC adder
// (there its carry-in is hardwired) and the true-sum generator inside the
// conditional bounding logic. Three carry structures can be chosen with
// ARCH, matching the ripple-carry, carry-lookahead and Kogge-Stone bases the
// approximate adders are compared on:
//   ARCH_RCA  carries ripple bit by bit;
//   ARCH_CLA  4-bit lookahead groups (group generate/propagate), groups ripple;
//   ARCH_KS   Kogge-Stone parallel prefix over (g, p) pairs, cin folded in
//             as the generate of a virtual bit -1.
// The group size of 4 is a choice of this design. Purely combinational.
module exact_adder
  import approx_pkg::*;
#(
  parameter int          W    = 7,
  parameter adder_arch_e ARCH = ARCH_CLA
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;     // c[i] is the carry into bit i

  assign g = a & b;
  assign p = a ^ b;

  generate
    if (ARCH == ARCH_RCA) begin : g_rca
      always_comb begin
        logic       cr;
        logic [W:0] cc;
        cr    = cin;
        cc[0] = cin;
        for (int i = 0; i < W; i++) begin
          cr      = g[i] | (p[i] & cr);
          cc[i+1] = cr;
        end
        c = cc;
      end
    end else if (ARCH == ARCH_CLA) begin : g_cla
      localparam int GS = 4;
      localparam int NG = (W + GS - 1) / GS;
      always_comb begin
        logic       gg, gp, cg, cr;
        logic [W:0] cc;
        cc[0] = cin;
        cr    = cin;
        for (int grp = 0; grp < NG; grp++) begin
          cg = cr;   // carry into this group
          // bits inside the group see lookahead carries from the group input
          for (int i = grp * GS; i < grp * GS + GS && i < W; i++) begin
            gg = 1'b0;
            gp = 1'b1;
            for (int j = grp * GS; j <= i; j++) begin
              gg = g[j] | (p[j] & gg);
              gp = gp & p[j];
            end
            cr      = gg | (gp & cg);
            cc[i+1] = cr;
          end
        end
        c = cc;
      end
    end else begin : g_ks
      // prefix levels over W+1 positions; position 0 carries cin as generate
      localparam int L = $clog2(W + 1);
      always_comb begin
        logic [W:0] gl [L+1];
        logic [W:0] pl [L+1];
        gl[0] = {g, cin};
        pl[0] = {p, 1'b0};
        for (int lv = 0; lv < L; lv++) begin
          for (int i = 0; i <= W; i++) begin
            if (i >= (1 << lv)) begin
              gl[lv+1][i] = gl[lv][i] | (pl[lv][i] & gl[lv][i - (1 << lv)]);
              pl[lv+1][i] = pl[lv][i] & pl[lv][i - (1 << lv)];
            end else begin
              gl[lv+1][i] = gl[lv][i];
              pl[lv+1][i] = pl[lv][i];
            end
          end
        end
        c = gl[L];
      end
    end
  endgenerate

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
