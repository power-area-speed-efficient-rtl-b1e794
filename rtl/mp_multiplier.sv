// mp_multiplier: 32x32 multiprecision multiplier.
//
// Three 16x16 three-sub-block units (mul16_3sub), each made of three
// Booth radix-4 / 4:2-compressor PEs, are shared by three modes:
//   PREC_8X8   : nine independent 8x8 products. Lane j (0..8) multiplies
//                a[8j+7:8j] by b[8j+7:8j] into p[16j+15:16j].
//   PREC_16X16 : three independent 16x16 products. Lane k (0..2) multiplies
//                a[16k+15:16k] by b[16k+15:16k] into p[32k+31:32k].
//   PREC_32X32 : one 32x32 product of a[31:0] and b[31:0] into p[63:0]
//                (PREC_RSVD is treated the same way).
// In 32x32 mode the same three-sub-block decomposition is applied once more
// with 16-bit halves: unit 0 forms UL*VL, unit 2 forms UH*VH and unit 1 the
// low 16 bits of U1*V1, where U1 = UH + UL and V1 = VH + VL are 17 bits.
// The 17th bits are put back with two gated 16-bit terms and one AND
// (U1*V1 = u*v + 2^16*(u16*v + v16*u) + 2^32*u16*v16), and
// karatsuba_combine with N = 16 (34-bit subtractor) builds the product.
// Result bits a mode does not use are 0, and operand bits it does not use
// are ignored. Purely combinational. The three modes and the repeated
// three-sub-block decomposition follow the original description; the mode
// codes other than 2'b11, the lane layout and the 17th-bit correction are
// this design's choices.
module mp_multiplier
  import mp_pkg::*;
(
  input  precision_e   algorithm,
  input  logic [71:0]  a,
  input  logic [71:0]  b,
  output logic [143:0] p
);
  logic [23:0] ua [3];
  logic [23:0] ub [3];
  logic [47:0] up [3];
  logic        split;

  // 32x32 path
  logic [15:0] uh, ul, vh, vl;
  logic [16:0] u1, v1;
  logic [33:0] pm32;
  logic [63:0] p32;

  assign uh = a[31:16];
  assign ul = a[15:0];
  assign vh = b[31:16];
  assign vl = b[15:0];
  assign u1 = {1'b0, uh} + {1'b0, ul};
  assign v1 = {1'b0, vh} + {1'b0, vl};

  assign split = (algorithm == PREC_8X8);

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      ua[k] = '0;
      ub[k] = '0;
    end
    unique case (algorithm)
      PREC_8X8: begin
        for (int k = 0; k < 3; k++) begin
          ua[k] = a[24*k +: 24];
          ub[k] = b[24*k +: 24];
        end
      end
      PREC_16X16: begin
        for (int k = 0; k < 3; k++) begin
          ua[k][15:0] = a[16*k +: 16];
          ub[k][15:0] = b[16*k +: 16];
        end
      end
      default: begin
        ua[0][15:0] = ul;          ub[0][15:0] = vl;
        ua[1][15:0] = u1[15:0];    ub[1][15:0] = v1[15:0];
        ua[2][15:0] = uh;          ub[2][15:0] = vh;
      end
    endcase
  end

  for (genvar k = 0; k < 3; k++) begin : g_unit
    mul16_3sub #(.N(8)) u_unit (.split(split), .a(ua[k]), .b(ub[k]), .p(up[k]));
  end

  // Restore the 17th bits of U1 and V1.
  always_comb begin
    pm32 = {2'b00, up[1][31:0]}
         + ({18'd0, u1[16] ? v1[15:0] : 16'd0} << 16)
         + ({18'd0, v1[16] ? u1[15:0] : 16'd0} << 16)
         + ({33'd0, u1[16] & v1[16]} << 32);
  end

  karatsuba_combine #(.N(16), .WA(19)) u_comb32 (
    .ph(up[2][31:0]), .pl(up[0][31:0]), .pm(pm32), .p(p32)
  );

  always_comb begin
    p = '0;
    unique case (algorithm)
      PREC_8X8:   p = {up[2], up[1], up[0]};
      PREC_16X16: p[95:0] = {up[2][31:0], up[1][31:0], up[0][31:0]};
      default:    p[63:0] = p32;
    endcase
  end

endmodule
