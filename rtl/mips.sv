// mips -- multicycle processor for an 8-bit subset of MIPS, written as register transfers.
//
// The machine runs the MIPS instructions lb, sb, add, sub, and, or, slt, beq, j and addi on
// 8-bit data with eight 8-bit registers ($0 always reads zero). Memory is byte wide, so each
// 32-bit instruction is fetched one byte per cycle in FETCH1..FETCH4 into four instruction
// byte registers while the PC steps by one per byte; the first byte fetched is instruction bits
// 31:24. DECODE reads the two source registers into A and B. Each instruction class then walks
// its own short path through the controller:
//
//   lb    MEMADR (RES <= A + imm)  LBRD (read byte at RES into MDR)  LBWR (rt <= MDR)      8 cycles
//   sb    MEMADR (RES <= A + imm)  SBWR (write B to byte RES)                              7 cycles
//   R     RTYPEEX (RES <= A op B)  RTYPEWR (rd <= RES)                                     7 cycles
//   addi  ADDIEX (RES <= A + imm)  RTYPEWR (rt <= RES)                                     7 cycles
//   beq   BEQEX (if A == B, PC <= PC + 4*imm, PC already pointing past the beq)            6 cycles
//   j     JEX (PC <= 4*target)                                                             6 cycles
//
// imm is the low byte of the 16-bit immediate and the jump target is its low six bits, which is
// all an 8-bit address needs. slt takes the sign bit of A - B, as the original datapath does, so
// it is a signed compare that ignores overflow. An unknown opcode returns to FETCH1 without
// effect; an unknown R-type function code leaves RES unchanged and writes it to rd.
//
// Interface: one byte-wide memory port. adr is the fetch PC in the four fetch cycles and RES in
// LBRD and SBWR; memread is high for the fetch and LBRD cycles, memwrite for SBWR. memdata is
// taken combinationally (the memory reads asynchronously) and sampled at the end of the cycle.
// reset is synchronous and clears the state to FETCH1 and the PC to 0; the other registers,
// including the register file, are not reset, as in the original model.
//
// The state graph, the state and instruction encodings, the four-byte fetch, the register
// transfers of each state and the port list follow the original behavioural model. Where that
// model is ambiguous this design takes standard MIPS meaning: the instruction word is
// assembled combinationally with the first fetched byte as its top byte, lb/sb add the unshifted
// immediate to the base register, beq adds the word offset times four, addi writes rt rather
// than rd, and sb drives its computed address on adr.
module mips
  import mips_pkg::*;
#(
  parameter int WIDTH   = 8,  // data and address width; the byte fetch needs 8
  parameter int REGBITS = 3   // log2 of the number of registers
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] memdata,
  output logic             memread,
  output logic             memwrite,
  output logic [WIDTH-1:0] adr,
  output logic [WIDTH-1:0] writedata
);

  if (WIDTH != 8) begin : g_width_check
    $error("mips: a 32-bit instruction is fetched as four 8-bit bytes, so WIDTH must be 8");
  end

  localparam int NREGS = 1 << REGBITS;

  // ---------------------------------------------------------------- architectural registers
  state_t                      state, nextstate;
  logic [WIDTH-1:0]            pc, nextpc;
  logic [3:0][7:0]             ir, nextir;      // ir[0] is the first byte fetched
  logic [WIDTH-1:0]            mdr;             // loads memdata every cycle
  logic [WIDTH-1:0]            areg, nextareg;  // first source operand (rs)
  logic [WIDTH-1:0]            wrd, nextwrd;    // second source operand (rt), also store data
  logic [WIDTH-1:0]            res, nextres;    // ALU result / effective address
  logic [WIDTH-1:0]            regfile [NREGS];

  // ---------------------------------------------------------------- instruction fields
  logic [31:0]        instr;
  logic [5:0]         op, funct;
  logic [REGBITS-1:0] rs, rt, rd;
  logic [WIDTH-1:0]   imm, offset4;

  assign instr   = {ir[0], ir[1], ir[2], ir[3]};
  assign op      = instr[31:26];
  assign funct   = instr[5:0];
  assign rs      = instr[21 +: REGBITS];
  assign rt      = instr[16 +: REGBITS];
  assign rd      = instr[11 +: REGBITS];
  assign imm     = instr[WIDTH-1:0];
  assign offset4 = {instr[WIDTH-3:0], 2'b00};

  // Register file reads; register 0 is hardwired to zero.
  logic [WIDTH-1:0] rd1, rd2;
  assign rd1 = (rs == '0) ? '0 : regfile[rs];
  assign rd2 = (rt == '0) ? '0 : regfile[rt];

  // Register file write port, used in LBWR and RTYPEWR.
  logic               regwrite;
  logic [REGBITS-1:0] wa;
  logic [WIDTH-1:0]   wd;

  // ---------------------------------------------------------------- next-state logic
  always_comb begin
    unique case (state)
      FETCH1:  nextstate = FETCH2;
      FETCH2:  nextstate = FETCH3;
      FETCH3:  nextstate = FETCH4;
      FETCH4:  nextstate = DECODE;
      DECODE:
        case (op)
          OP_LB, OP_SB: nextstate = MEMADR;
          OP_RTYPE:     nextstate = RTYPEEX;
          OP_BEQ:       nextstate = BEQEX;
          OP_J:         nextstate = JEX;
          OP_ADDI:      nextstate = ADDIEX;
          default:      nextstate = FETCH1;
        endcase
      MEMADR:
        case (op)
          OP_LB:   nextstate = LBRD;
          OP_SB:   nextstate = SBWR;
          default: nextstate = FETCH1;
        endcase
      LBRD:    nextstate = LBWR;
      ADDIEX:  nextstate = RTYPEWR;
      RTYPEEX: nextstate = RTYPEWR;
      default: nextstate = FETCH1;  // LBWR, SBWR, RTYPEWR, BEQEX, JEX and unused codes
    endcase
  end

  // ---------------------------------------------------------------- register transfers
  logic [WIDTH-1:0] diff;
  assign diff = areg + ~wrd + WIDTH'(1);

  always_comb begin
    // Registers hold unless a state changes them; outputs idle.
    nextpc    = pc;
    nextir    = ir;
    nextareg  = areg;
    nextwrd   = wrd;
    nextres   = res;
    memread   = 1'b0;
    memwrite  = 1'b0;
    adr       = pc;
    writedata = wrd;
    regwrite  = 1'b0;
    wa        = rd;
    wd        = res;

    unique case (state)
      FETCH1, FETCH2, FETCH3, FETCH4: begin
        memread = 1'b1;
        adr     = pc;
        nextpc  = pc + WIDTH'(1);
        case (state)
          FETCH1:  nextir[0] = memdata[7:0];
          FETCH2:  nextir[1] = memdata[7:0];
          FETCH3:  nextir[2] = memdata[7:0];
          default: nextir[3] = memdata[7:0];
        endcase
      end
      DECODE: begin
        nextareg = rd1;
        nextwrd  = rd2;
      end
      MEMADR:  nextres = areg + imm;
      LBRD: begin
        memread = 1'b1;
        adr     = res;
      end
      LBWR: begin
        regwrite = 1'b1;
        wa       = rt;
        wd       = mdr;
      end
      SBWR: begin
        memwrite  = 1'b1;
        adr       = res;
        writedata = wrd;
      end
      RTYPEEX:
        case (funct)
          FN_ADD:  nextres = areg + wrd;
          FN_SUB:  nextres = diff;
          FN_AND:  nextres = areg & wrd;
          FN_OR:   nextres = areg | wrd;
          FN_SLT:  nextres = {{(WIDTH-1){1'b0}}, diff[WIDTH-1]};
          default: nextres = res;
        endcase
      RTYPEWR: begin
        regwrite = 1'b1;
        wa       = (op == OP_ADDI) ? rt : rd;
        wd       = res;
      end
      ADDIEX:  nextres = areg + imm;
      BEQEX:   if (areg == wrd) nextpc = pc + offset4;
      JEX:     nextpc = offset4;
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- state update
  always_ff @(posedge clk) begin
    ir   <= nextir;
    mdr  <= memdata;
    areg <= nextareg;
    wrd  <= nextwrd;
    res  <= nextres;
    if (regwrite && wa != '0) regfile[wa] <= wd;
    if (reset) begin
      state <= FETCH1;
      pc    <= '0;
    end else begin
      state <= nextstate;
      pc    <= nextpc;
    end
  end

  // A store and a read never share a cycle.
  assert property (@(posedge clk) disable iff (reset) !(memread && memwrite));

endmodule
