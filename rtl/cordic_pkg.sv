// cordic_pkg: types and constants shared by the CORDIC sine/cosine accelerator.
//
// Number format. The core exchanges 64-bit two's-complement fixed-point words with
// 32 integer bits and 32 fraction bits (Q32.32). The angle is given in degrees.
// Inside the array only the low integer bits are kept: XY_INT integer bits (sign
// included) for the X/Y coordinates, whose magnitude never exceeds about 1.65, and
// Z_INT integer bits for the residual angle in degrees, which never exceeds the
// +/-99.88 degree convergence range of the algorithm.
//
// Constant tables. CORDIC round i rotates by alpha_i = atan(2^-i). The tables hold,
// for i = 0..MAX_ROUNDS-1,
//   atan_deg(i) = round( (180/pi) * atan(2^-i) * 2^32 )            (degrees, Q.32)
//   k_gain(n)   = round( prod_{j=0..n-1} cos(atan(2^-j)) * 2^32 )  (gain for n rounds, Q.32)
// X starts at k_gain(ROUNDS) so that the final X and Y are cos and sin without any
// multiplier.
//
// Instruction (R/I-type custom instruction): imm[11:0] in bits 31:20 (zero), rs1 in
// 19:15, funct3 in 14:12, rd in 11:7, opcode in 6:0 = custom-2. funct3 = 0 selects
// cosine, funct3 = 1 selects sine; these follow the design description. The numeric
// custom-2 opcode 7'b1011011 is the value reserved by the RISC-V base encoding map.
package cordic_pkg;

  localparam int unsigned XLEN       = 64;
  localparam int unsigned FRAC       = 32;
  localparam int unsigned MAX_ROUNDS = 16;

  localparam logic [6:0] OPC_CUSTOM2 = 7'b1011011;

  typedef enum logic [2:0] {
    FN_COS = 3'd0,
    FN_SIN = 3'd1
  } cordic_fn_e;

  // Fields of the custom instruction word.
  typedef struct packed {
    logic [11:0] imm;
    logic [4:0]  rs1;
    logic [2:0]  funct3;
    logic [4:0]  rd;
    logic [6:0]  opcode;
  } cordic_inst_t;

  // RoCC command: instruction plus the two source register values.
  typedef struct packed {
    cordic_inst_t     inst;
    logic [XLEN-1:0]  rs1;
    logic [XLEN-1:0]  rs2;
  } rocc_cmd_t;

  // RoCC response: destination register and value.
  typedef struct packed {
    logic [4:0]       rd;
    logic [XLEN-1:0]  data;
  } rocc_resp_t;

  // atan(2^-i) in degrees, Q.32, unsigned (bit 38 is the top set bit, at i = 0).
  function automatic logic [39:0] atan_deg(input int unsigned i);
    case (i)
      0:  return 40'h2D_0000_0000;
      1:  return 40'h1A_90A7_31A6;
      2:  return 40'h0E_0947_407D;
      3:  return 40'h07_2001_124A;
      4:  return 40'h03_938A_A64C;
      5:  return 40'h01_CA37_94E5;
      6:  return 40'h00_E52A_1AB2;
      7:  return 40'h00_7296_D7A1;
      8:  return 40'h00_394B_A51C;
      9:  return 40'h00_1CA5_D9B7;
      10: return 40'h00_0E52_EDC1;
      11: return 40'h00_0729_76FD;
      12: return 40'h00_0394_BB82;
      13: return 40'h00_01CA_5DC2;
      14: return 40'h00_00E5_2EE1;
      15: return 40'h00_0072_9770;
      default: return 40'h0;
    endcase
  endfunction

  // Aggregate gain K for n rounds, Q.32 (value below 1).
  function automatic logic [31:0] k_gain(input int unsigned n);
    case (n)
      1:  return 32'hB504_F334;
      2:  return 32'hA1E8_9B12;
      3:  return 32'h9D13_0DD3;
      4:  return 32'h9BDC_8A0F;
      5:  return 32'h9B8E_D60C;
      6:  return 32'h9B7B_67D6;
      7:  return 32'h9B76_8C35;
      8:  return 32'h9B75_554C;
      9:  return 32'h9B75_0791;
      10: return 32'h9B74_F422;
      11: return 32'h9B74_EF47;
      12: return 32'h9B74_EE10;
      13: return 32'h9B74_EDC2;
      14: return 32'h9B74_EDAF;
      15: return 32'h9B74_EDAA;
      16: return 32'h9B74_EDA9;
      default: return 32'h0;
    endcase
  endfunction

endpackage
