// rv_ref_pkg: instruction encoders and a reference instruction-set model
// for the processor testbenches.
//
// rv_model executes one instruction at a time on its own register array and
// a word memory of MEM_WORDS words (byte address bits above the memory size
// ignored, as in the hardware), straight from the instruction-set
// definition: it shares no code with the RTL. exec() returns what the
// hardware should show during that cycle (ALU result / memory address,
// store lanes) and applies the architectural update. The encoders build
// R, I and S format words; rand_inst() draws a random implemented
// instruction.
package rv_ref_pkg;

  localparam logic [6:0] OP = 7'b0110011, OPI = 7'b0010011, LD = 7'b0000011, ST = 7'b0100011;

  function automatic logic [31:0] enc_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, OP};
  endfunction

  function automatic logic [31:0] enc_i(logic [6:0] opc, logic [11:0] imm, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd);
    return {imm, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] enc_s(logic [11:0] imm, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], ST};
  endfunction

  // Instruction classes, for counting what a test exercised
  typedef enum int {
    K_R_ADD, K_R_SUB, K_R_OTHER, K_I_ARITH, K_SHIFT_IMM,
    K_LB, K_LH, K_LW, K_LBU, K_LHU, K_SB, K_SH, K_SW,
    K_X0_WRITE, K_ILLEGAL, K_COUNT
  } kind_e;

  typedef struct {
    logic [31:0] alu;      // ALU result = data memory address
    logic        store;
    logic [3:0]  wmask;    // byte lanes written
    logic [31:0] wlanes;   // store data on its lanes (only masked bytes meaningful)
    logic        wen;
    logic [4:0]  rd;
    logic [31:0] wb;
    kind_e       kind;
    logic        x0_write; // an instruction that writes back named x0
  } effect_t;

  class rv_model;
    logic [31:0] regs [32];
    logic [31:0] mem [];
    int          words;

    function new(int mem_words);
      words = mem_words;
      mem = new[mem_words];
      foreach (regs[i]) regs[i] = 32'h0;
      foreach (mem[i]) mem[i] = 32'h0;
    endfunction

    function int widx(logic [31:0] a);
      return int'((a >> 2) % 32'(words));
    endfunction

    function effect_t exec(logic [31:0] inst);
      effect_t e;
      logic [31:0] a, b, imm_i, imm_s, w;
      logic [4:0] sh;
      int unsigned off;
      logic [2:0] f3;
      a = regs[inst[19:15]];
      b = regs[inst[24:20]];
      imm_i = 32'(signed'(inst[31:20]));
      imm_s = 32'(signed'({inst[31:25], inst[11:7]}));
      f3 = inst[14:12];
      e = '{alu: 32'h0, store: 1'b0, wmask: 4'h0, wlanes: 32'h0, wen: 1'b0,
            rd: inst[11:7], wb: 32'h0, kind: K_ILLEGAL, x0_write: 1'b0};
      case (inst[6:0])
        OP, OPI: begin
          logic [31:0] y;
          logic alt;
          y = (inst[6:0] == OP) ? b : imm_i;
          sh = y[4:0];
          alt = inst[30];
          if (inst[6:0] == OP && !(inst[31:25] == 7'b0 || (inst[31:25] == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101))))
            return e;
          if (inst[6:0] == OPI && f3 == 3'b001 && inst[31:25] != 7'b0) return e;
          if (inst[6:0] == OPI && f3 == 3'b101 && !(inst[31:25] == 7'b0 || inst[31:25] == 7'b0100000)) return e;
          case (f3)
            3'b000: e.alu = (inst[6:0] == OP && alt) ? a - y : a + y;
            3'b001: e.alu = a << sh;
            3'b010: e.alu = {31'b0, $signed(a) < $signed(y)};
            3'b011: e.alu = {31'b0, a < y};
            3'b100: e.alu = a ^ y;
            3'b101: e.alu = alt ? 32'($signed(a) >>> sh) : a >> sh;
            3'b110: e.alu = a | y;
            default: e.alu = a & y;
          endcase
          e.wen = 1'b1; e.wb = e.alu;
          if (inst[6:0] == OP) e.kind = (f3 == 3'b000) ? (alt ? K_R_SUB : K_R_ADD) : K_R_OTHER;
          else e.kind = (f3 == 3'b001 || f3 == 3'b101) ? K_SHIFT_IMM : K_I_ARITH;
        end
        LD: begin
          e.alu = a + imm_i;
          w = mem[widx(e.alu)];
          off = 8 * int'(e.alu[1:0]);
          case (f3)
            3'b000: begin e.wb = 32'(signed'(8'(w >> off)));  e.kind = K_LB;  end
            3'b001: begin e.wb = 32'(signed'(16'(w >> (off & 16)))); e.kind = K_LH; end
            3'b010: begin e.wb = w; e.kind = K_LW; end
            3'b100: begin e.wb = 32'(8'(w >> off)); e.kind = K_LBU; end
            3'b101: begin e.wb = 32'(16'(w >> (off & 16))); e.kind = K_LHU; end
            default: return e;
          endcase
          e.wen = 1'b1;
        end
        ST: begin
          e.alu = a + imm_s;
          off = 8 * int'(e.alu[1:0]);
          case (f3)
            3'b000: begin e.wmask = 4'b0001 << e.alu[1:0]; e.wlanes = 32'(b[7:0]) << off; e.kind = K_SB; end
            3'b001: begin e.wmask = e.alu[1] ? 4'b1100 : 4'b0011; e.wlanes = 32'(b[15:0]) << (off & 16); e.kind = K_SH; end
            3'b010: begin e.wmask = 4'b1111; e.wlanes = b; e.kind = K_SW; end
            default: return e;
          endcase
          e.store = 1'b1;
          for (int i = 0; i < 4; i++)
            if (e.wmask[i]) mem[widx(e.alu)][8*i +: 8] = e.wlanes[8*i +: 8];
        end
        default: return e;
      endcase
      if (e.wen) begin
        if (e.rd == 5'd0) e.x0_write = 1'b1;
        else regs[e.rd] = e.wb;
      end
      return e;
    endfunction
  endclass

  // A random implemented instruction; register numbers below 'nregs'
  function automatic logic [31:0] rand_inst(int nregs);
    logic [4:0] rd, rs1, rs2;
    logic [2:0] f3;
    logic [11:0] imm;
    int pick;
    rd  = 5'($urandom_range(0, nregs - 1));
    rs1 = 5'($urandom_range(0, nregs - 1));
    rs2 = 5'($urandom_range(0, nregs - 1));
    f3  = 3'($urandom);
    imm = 12'($urandom);
    pick = $urandom_range(0, 99);
    if (pick < 30) begin
      logic [6:0] f7 = ((f3 == 3'b000 || f3 == 3'b101) && $urandom_range(0, 1) == 1) ? 7'b0100000 : 7'b0;
      return enc_r(f7, rs2, rs1, f3, rd);
    end else if (pick < 55) begin
      if (f3 == 3'b001) imm[11:5] = 7'b0;
      if (f3 == 3'b101) imm[11:5] = $urandom_range(0, 1) ? 7'b0100000 : 7'b0;
      return enc_i(OPI, imm, rs1, f3, rd);
    end else if (pick < 78) begin
      logic [2:0] lf [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
      return enc_i(LD, imm, rs1, lf[$urandom_range(0, 4)], rd);
    end else if (pick < 98) begin
      return enc_s(imm, rs2, rs1, 3'($urandom_range(0, 2)));
    end else begin
      // outside the subset: lui / jal / beq with random fields
      logic [6:0] o [3] = '{7'b0110111, 7'b1101111, 7'b1100011};
      return {$urandom} & 32'hffff_ff80 | 32'(o[$urandom_range(0, 2)]);
    end
  endfunction

endpackage
