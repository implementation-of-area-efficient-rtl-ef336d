// vedic_mul: N x N-bit unsigned Urdhva-Tiryakbhyam multiplier, built
// hierarchically from the 4x4 architecture (N = 32 by default, the size of the
// design's main multiplier; N = 16 gives its 16-bit version).
//
// Each level splits both operands into halves of H = N/2 bits and uses four
// H x H multipliers, which all work at once:
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (N bits each)
// followed by three N-bit ripple-carry adders in the same arrangement as the
// 4x4 block:
//   s1 = q1 + q2 (carry c1);  s2 = s1 + (q0 >> H) (carry c2)
//   s3 = q3 + {c1|c2, s2[N-1:H]}
//   p  = {s3, s2[H-1:0], q0[H-1:0]}
// c1 and c2 are mutually exclusive for every N (q1 + q2 - 2^N leaves at most
// 2^N - 2^(H+2) + 2, and q0 >> H adds at most 2^H - 2), so one OR merges them.
// The hierarchy is laid out level by level rather than by a module that
// instantiates itself: level 0 is an array of (N/4)^2 vedic_mul4x4 blocks, one
// per pair of 4-bit operand chunks; level l combines the four products of
// level l-1 that make up each pair of (4 << l)-bit chunks, until level
// log2(N)-2 holds the single N x N product. This is the same set of blocks
// and adders as a recursive build would use (at N = 32: 64 4x4 blocks and
// 3 + 12 + 48 wider adders). For N = 4 or 2 the module is just vedic_mul4x4
// or vedic_mul2x2.
// Purely combinational: there is no clock and no pipeline register, so the
// product is valid one combinational delay after the operands.
//
// Interface: a, b (N bits, unsigned) -> p (2N bits). N must be a power of
// two, at least 2.
// The design describes the 2x2 and 4x4 blocks and names the 16- and 32-bit
// multipliers; growing them with the same four-blocks-three-adders pattern
// at every level, and using ripple-carry adders at every level, is this
// design's choice.
module vedic_mul #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mul: N must be a power of two, at least 2");
  end

  if (N == 2) begin : g_leaf2
    vedic_mul2x2 u_m (.a(a), .b(b), .p(p));
  end else if (N == 4) begin : g_leaf4
    vedic_mul4x4 u_m (.a(a), .b(b), .p(p));
  end else begin : g_tree
    localparam int unsigned NL = $clog2(N) - 2;   // levels above 4x4

    // g_lvl[l].prod[i][j] = (chunk i of a) * (chunk j of b), chunks of
    // S = 4 << l bits, chunk 0 the least significant.
    for (genvar l = 0; l <= NL; l++) begin : g_lvl
      localparam int unsigned S  = 4 << l;
      localparam int unsigned NB = N / S;
      logic [2*S-1:0] prod [0:NB-1][0:NB-1];

      if (l == 0) begin : g_4x4
        for (genvar i = 0; i < NB; i++) begin : g_i
          for (genvar j = 0; j < NB; j++) begin : g_j
            vedic_mul4x4 u_m (
              .a(a[4*i +: 4]),
              .b(b[4*j +: 4]),
              .p(prod[i][j])
            );
          end
        end
      end else begin : g_combine
        localparam int unsigned H = S / 2;
        for (genvar i = 0; i < NB; i++) begin : g_i
          for (genvar j = 0; j < NB; j++) begin : g_j
            logic [S-1:0] q0, q1, q2, q3;
            logic [S-1:0] s1, s2, s3;
            logic         c1, c2, c3;

            assign q0 = g_lvl[l-1].prod[2*i][2*j];       // aL * bL
            assign q1 = g_lvl[l-1].prod[2*i+1][2*j];     // aH * bL
            assign q2 = g_lvl[l-1].prod[2*i][2*j+1];     // aL * bH
            assign q3 = g_lvl[l-1].prod[2*i+1][2*j+1];   // aH * bH

            ripple_carry_adder #(.W(S)) u_add1 (
              .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
            );
            ripple_carry_adder #(.W(S)) u_add2 (
              .a(s1), .b({{H{1'b0}}, q0[S-1:H]}), .cin(1'b0), .sum(s2), .cout(c2)
            );
            ripple_carry_adder #(.W(S)) u_add3 (
              .a(q3), .b({{(H-1){1'b0}}, c1 | c2, s2[S-1:H]}), .cin(1'b0),
              .sum(s3), .cout(c3)
            );

            assign prod[i][j] = {s3, s2[H-1:0], q0[H-1:0]};

            // The product fits 2S bits, so the last adder never carries out.
            always_comb assert (!c3);
          end
        end
      end
    end

    assign p = g_lvl[NL].prod[0][0];
  end
endmodule
