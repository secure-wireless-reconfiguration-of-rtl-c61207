// gumnut_alu: combinational arithmetic, logic and shift unit of the Gumnut core.
//
// Computes y = f(a, b) for the eight arithmetic/logical functions and the
// four shift/rotate functions, together with the next zero (Z) and carry (C)
// flags. `is_shift` selects the shifter; `b[2:0]` is then the shift count.
//
// Flag rules (this design's choice where the instruction table is silent):
//   add/addc: C is the carry out of bit 7; addc adds the old C.
//   sub/subc: C is the borrow out of bit 7; subc also subtracts the old C.
//   and/or/xor/mask: C is cleared.
//   shl/shr: C is the last bit shifted out; rol/ror: C is the last bit
//   rotated around. A count of zero clears C.
//   Z is set when y is zero, for every function.
// Purely combinational, no clock.
module gumnut_alu
  import gumnut_pkg::*;
(
  input  byte_t      a,         // rs
  input  byte_t      b,         // op2 (register or immediate) or count
  input  logic       c_in,      // current carry flag
  input  logic       is_shift,  // 1: shift/rotate, 0: arithmetic/logical
  input  alu_fn_e    alu_fn,
  input  shift_fn_e  shift_fn,
  output byte_t      y,
  output logic       z_out,
  output logic       c_out
);

  logic [8:0] wide;
  logic [2:0] cnt;
  logic [15:0] dbl;

  always_comb begin
    wide  = '0;
    y     = '0;
    c_out = 1'b0;
    cnt   = b[2:0];
    dbl   = {a, a};
    if (!is_shift) begin
      unique case (alu_fn)
        ALU_ADD:  begin wide = {1'b0, a} + {1'b0, b};                    y = wide[7:0]; c_out = wide[8]; end
        ALU_ADDC: begin wide = {1'b0, a} + {1'b0, b} + {8'd0, c_in};     y = wide[7:0]; c_out = wide[8]; end
        ALU_SUB:  begin wide = {1'b0, a} - {1'b0, b};                    y = wide[7:0]; c_out = wide[8]; end
        ALU_SUBC: begin wide = {1'b0, a} - {1'b0, b} - {8'd0, c_in};     y = wide[7:0]; c_out = wide[8]; end
        ALU_AND:  y = a & b;
        ALU_OR:   y = a | b;
        ALU_XOR:  y = a ^ b;
        ALU_MASK: y = a & ~b;
        default:  y = '0;
      endcase
    end else begin
      unique case (shift_fn)
        SH_SHL: begin
          y = a << cnt;
          c_out = (cnt != 3'd0) ? a[3'd7 - (cnt - 3'd1)] : 1'b0;
        end
        SH_SHR: begin
          y = a >> cnt;
          c_out = (cnt != 3'd0) ? a[cnt - 3'd1] : 1'b0;
        end
        SH_ROL: begin
          dbl   = {a, a} << cnt;
          y     = dbl[15:8];
          c_out = (cnt != 3'd0) ? y[0] : 1'b0;
        end
        SH_ROR: begin
          dbl   = {a, a} >> cnt;
          y     = dbl[7:0];
          c_out = (cnt != 3'd0) ? y[7] : 1'b0;
        end
        default: y = '0;
      endcase
    end
    z_out = (y == 8'd0);
  end

endmodule
