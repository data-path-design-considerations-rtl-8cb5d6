// tb_ref_pkg: reference model shared by the data-path testbenches.
//
// Computes what the hardware should produce, without using any RTL module:
// the physical register row of a (logical address, window) pair from the
// window layout (globals, then 16 rows per window, the parent overlap of
// window w being the child overlap of window w+1), the ALU result with plain
// + and - and bitwise operators, the shifts with <<, >> and >>>, the byte
// operations with shifts and masks, the whole busD result of a decoded
// instruction (ALU and shifter results take the tag of operand A), and the
// branch decision from signed and unsigned comparisons. It also draws random
// 40-bit words and random decoded instructions; in narrow mode the register
// addresses come from a small pool (globals, both overlap ranges and
// locals) so that dependences between neighbouring instructions are common.
// Functions only, no timing. The window layout and tag rule follow the
// document; the operation encodings are this design's.
package tb_ref_pkg;
  import spur_pkg::*;

  function automatic word_t rand_word();
    return {8'($urandom), 32'($urandom)};
  endfunction

  function automatic int ref_row(int a, int w);
    if (a < 10) return a;
    if (a < 16) return 20 + 16 * w + (a - 10);
    if (a < 26) return 10 + 16 * w + (a - 16);
    return 20 + 16 * ((w + 1) % 8) + (a - 26);
  endfunction

  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      ALU_ADD: return a + b;
      ALU_SUB: return a - b;
      ALU_AND: return a & b;
      ALU_OR:  return a | b;
      default: return a ^ b;
    endcase
  endfunction

  function automatic word_t ref_exec(ctrl_t c, word_t a, word_t b, word_t psw);
    int k;
    k = c.byte_sel >= 4 ? 4 : int'(c.byte_sel);
    case (c.fu)
      FU_ALU:   return {a[39:32], ref_alu(c.alu_op, a[31:0], b[31:0])};
      FU_SHIFT: begin
        case (c.shift_op)
          SH_SLL:  return {a[39:32], a[31:0] << c.shamt};
          SH_SRL:  return {a[39:32], a[31:0] >> 1};
          default: return {a[39:32], 32'($signed(a[31:0]) >>> 1)};
        endcase
      end
      FU_BEXT:  return 40'((a >> (8 * k)) & 40'hff);
      FU_BINS:  return (a & ~(40'hff << (8 * k))) | (40'(b[7:0]) << (8 * k));
      default:  return psw;
    endcase
  endfunction

  function automatic logic ref_taken(cond_e c, logic [31:0] a, logic [31:0] b);
    case (c)
      C_EQ:     return a == b;
      C_NE:     return a != b;
      C_LT:     return $signed(a) <  $signed(b);
      C_LE:     return $signed(a) <= $signed(b);
      C_GT:     return $signed(a) >  $signed(b);
      C_GE:     return $signed(a) >= $signed(b);
      C_LTU:    return a <  b;
      C_LEU:    return a <= b;
      C_GTU:    return a >  b;
      C_GEU:    return a >= b;
      C_ALWAYS: return 1'b1;
      default:  return 1'b0;
    endcase
  endfunction

  // Random register-to-register style instruction; registers drawn from a
  // small set so that dependencies between neighbours are frequent.
  function automatic ctrl_t rand_ctrl(int narrow);
    ctrl_t c;
    raddr_t pool[8] = '{5'd1, 5'd2, 5'd11, 5'd17, 5'd18, 5'd27, 5'd30, 5'd9};
    c = '0;
    c.rs1 = narrow ? pool[$urandom % 8] : raddr_t'($urandom);
    c.rs2 = narrow ? pool[$urandom % 8] : raddr_t'($urandom);
    c.rd  = narrow ? pool[$urandom % 8] : raddr_t'($urandom);
    c.rd_we = 1'b1;
    c.use_imm = ($urandom % 4 == 0);
    c.imm = rand_word();
    c.fu = fu_e'($urandom % 4);
    c.alu_op = alu_op_e'($urandom % 5);
    c.shift_op = shift_op_e'($urandom % 3);
    c.shamt = 2'($urandom);
    c.byte_sel = 3'($urandom);
    c.if_enable = 1'b1;
    c.cond = C_NEVER;
    return c;
  endfunction
endpackage
