// tb_mips -- self-checking test of the processor against an instruction-level reference model.
//
// The testbench is the processor's memory: a 256-byte array read combinationally and written
// at the rising edge when memwrite is high. For each of several rounds it writes a random
// program into bytes 0..191 and random data into 192..223, then runs the processor from reset.
// A program sets $1..$7 with addi from $0, runs 33 random instructions (add, sub, and, or, slt,
// addi, lb, sb, beq over the next instruction with equal or random registers, j over the next
// instruction; destination $0 included), stores $1..$7 to bytes 248..254 and spins on a jump
// to itself.
//
// A reference model in this file executes the same program one instruction at a time with
// MIPS semantics on 8-bit data and records every store with the cycle it must happen in,
// counting 8 cycles for lb, 7 for sb, R-type and addi and 6 for beq and j. Every store of the
// processor is compared with that list in address, data and cycle; fetch cycles are checked
// to present the expected PC with memread high. Reset between rounds restarts the processor
// at address 0. A watchdog ends the run after 20000 cycles.
module tb_mips;
  import mips_pkg::*;

  localparam int ROUNDS    = 6;
  localparam int NRANDOM   = 33;
  localparam int CODE_END  = 192;

  logic       clk = 1'b0;
  logic       reset;
  logic [7:0] memdata;
  logic       memread, memwrite;
  logic [7:0] adr, writedata;

  logic [7:0] mem [256];

  int checks   = 0;
  int failures = 0;

  mips dut (
    .clk       (clk),
    .reset     (reset),
    .memdata   (memdata),
    .memread   (memread),
    .memwrite  (memwrite),
    .adr       (adr),
    .writedata (writedata)
  );

  always #5 clk = ~clk;

  assign memdata = mem[adr];
  always @(posedge clk) if (memwrite) mem[adr] <= writedata;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- instruction encoders
  function automatic logic [31:0] rtype(input logic [5:0] fn, input int rd, rs, rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(input logic [5:0] op, input int rt, rs,
                                        input logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] jtype(input int target_word);
    return {OP_J, 26'(target_word)};
  endfunction

  logic [31:0] prog [CODE_END/4];

  task automatic put_program();
    for (int i = 0; i < CODE_END / 4; i++) begin
      mem[4*i]   = prog[i][31:24];
      mem[4*i+1] = prog[i][23:16];
      mem[4*i+2] = prog[i][15:8];
      mem[4*i+3] = prog[i][7:0];
    end
  endtask

  // Random program as described above; returns the word index of the final spin jump.
  function automatic int make_program();
    int n = 0;
    logic [5:0] fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT};
    for (int r = 1; r < 8; r++) prog[n++] = itype(OP_ADDI, r, 0, 16'($urandom_range(0, 255)));
    for (int k = 0; k < NRANDOM; k++) begin
      int kind = $urandom_range(0, 9);
      int a = $urandom_range(0, 7), b = $urandom_range(0, 7), c = $urandom_range(0, 7);
      case (kind)
        0, 1, 2: prog[n++] = rtype(fns[$urandom_range(0, 4)], a, b, c);
        3:       prog[n++] = itype(OP_ADDI, a, b, 16'($urandom_range(0, 255)));
        4:       prog[n++] = itype(OP_LB, a, 0, 16'($urandom_range(192, 223)));
        5:       prog[n++] = itype(OP_SB, a, 0, 16'($urandom_range(224, 247)));
        6:       prog[n++] = itype(OP_BEQ, b, b, 16'd1);           // always taken
        7:       prog[n++] = itype(OP_BEQ, b, c, 16'd1);           // data dependent
        default: begin
          prog[n] = jtype(n + 2);
          n++;
        end
      endcase
    end
    for (int r = 1; r < 8; r++) prog[n++] = itype(OP_SB, r, 0, 16'(247 + r));
    prog[n] = jtype(n);
    for (int i = n + 1; i < CODE_END / 4; i++) prog[i] = '0;
    return n;
  endfunction

  // ---------------------------------------------------------------- reference model
  typedef struct {
    logic [7:0] adr;
    logic [7:0] data;
    int         cycle;
  } store_t;

  store_t exp_stores [$];
  int     exp_fetch_pc [int];   // cycle of each FETCH1 -> its PC (first 400 cycles)
  int     cls_count [string];

  task automatic reference(input int halt_word);
    logic [7:0] r [8];
    logic [7:0] m [256];
    logic [7:0] pc = 0;
    int cyc = 0;
    r = '{default: 8'd0};
    m = mem;
    exp_stores.delete();
    exp_fetch_pc.delete();
    while (pc != 8'(4 * halt_word)) begin
      logic [31:0] in;
      logic [7:0]  a, b, imm, res;
      int rs, rt, rd;
      in  = {m[pc], m[pc+8'd1], m[pc+8'd2], m[pc+8'd3]};
      exp_fetch_pc[cyc] = int'(pc);
      rs  = int'(in[23:21]);
      rt  = int'(in[18:16]);
      rd  = int'(in[13:11]);
      a   = r[rs];
      b   = r[rt];
      imm = in[7:0];
      pc  = pc + 8'd4;
      case (in[31:26])
        OP_LB: begin
          if (rt != 0) r[rt] = m[8'(a + imm)];
          cyc += 8; cls_count["lb"]++;
        end
        OP_SB: begin
          exp_stores.push_back('{adr: 8'(a + imm), data: b, cycle: cyc + 6});
          m[8'(a + imm)] = b;
          cyc += 7; cls_count["sb"]++;
        end
        OP_ADDI: begin
          if (rt != 0) r[rt] = a + imm;
          cyc += 7; cls_count["addi"]++;
        end
        OP_RTYPE: begin
          case (in[5:0])
            FN_ADD: res = a + b;
            FN_SUB: res = a - b;
            FN_AND: res = a & b;
            FN_OR:  res = a | b;
            // slt: the sign bit of the 8-bit difference
            default: res = {7'd0, 1'(8'(a - b) >> 7)};
          endcase
          if (rd != 0) r[rd] = res;
          cyc += 7; cls_count["rtype"]++;
        end
        OP_BEQ: begin
          if (a == b) begin
            pc = pc + {imm[5:0], 2'b00};
            cls_count["beq_taken"]++;
          end else cls_count["beq_not_taken"]++;
          cyc += 6;
        end
        default: begin  // OP_J
          pc = {in[5:0], 2'b00};
          cyc += 6; cls_count["j"]++;
        end
      endcase
    end
    exp_fetch_pc[cyc] = int'(pc);  // the spin jump
  endtask

  // ---------------------------------------------------------------- DUT monitor
  int     cycle;
  int     got;
  bit     running = 1'b0;

  always @(negedge clk) if (running) begin
    if (exp_fetch_pc.exists(cycle))
      check(memread && adr == 8'(exp_fetch_pc[cycle]),
            $sformatf("cycle %0d: fetch adr=%0d memread=%0b, expected adr=%0d", cycle, adr,
                      memread, exp_fetch_pc[cycle]));
    if (memwrite) begin
      if (got < exp_stores.size())
        check(adr == exp_stores[got].adr && writedata == exp_stores[got].data &&
              cycle == exp_stores[got].cycle,
              $sformatf("store %0d: adr=%0d data=%0d cycle=%0d, expected %0d %0d %0d", got,
                        adr, writedata, cycle, exp_stores[got].adr, exp_stores[got].data,
                        exp_stores[got].cycle));
      else check(1'b0, $sformatf("unexpected store adr=%0d data=%0d", adr, writedata));
      got++;
    end
    cycle++;
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- rounds
  initial begin
    void'($urandom(7));
    reset = 1'b1;
    for (int round = 0; round < ROUNDS; round++) begin
      int halt, last;
      reset = 1'b1;
      running = 1'b0;
      for (int i = 0; i < 256; i++) mem[i] = 8'($urandom());
      halt = make_program();
      put_program();
      reference(halt);
      last = exp_stores[$].cycle;
      repeat (2) @(posedge clk);
      @(negedge clk);
      reset = 1'b0;
      cycle = 0;
      got = 0;
      running = 1'b1;
      repeat (last + 40) @(posedge clk);
      @(negedge clk);
      check(got == exp_stores.size(),
            $sformatf("round %0d: %0d stores, expected %0d", round, got, exp_stores.size()));
    end
    running = 1'b0;
    foreach (cls_count[k]) $display("%s: %0d", k, cls_count[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
