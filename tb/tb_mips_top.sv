// tb_mips_top -- end-to-end test of the processor with its memory, at default parameters.
//
// The memory is loaded with the test program rtl/memfile.dat, which loads three data bytes
// (3, 5, 12), combines them with or, and, add, slt, sub and addi, takes one beq and skips
// another, jumps over two loads that must not run, and ends with "sb $7, 0($1)", which
// must store 7 at byte address 5, after which it spins on a jump to itself. Address 5 lies in
// the code already run, and the byte there is 07 already, so the program text is unchanged.
// A correct run prints "Simulation completely successful", as the original harness does.
//
// Checks: exactly one store, to address 5 with data 7, in cycle 104 after reset (the sum of
// the per-class cycle counts 8 (lb), 7 (sb, R-type, addi) and 6 (beq, j) over the 15
// instructions before it plus six cycles into the store); the final register values worked
// out by hand; the stored word read back from the memory array. Every controller state and
// every mechanism (beq taken and not taken, jump, each R-type function, addi) is counted, and
// one that never happens is a failure. A watchdog ends the run after 3000 cycles.
module tb_mips_top;
  import mips_pkg::*;

  logic       clk = 1'b0;
  logic       reset;
  logic       memread, memwrite;
  logic [7:0] adr, writedata, memdata;

  int checks   = 0;
  int failures = 0;
  int cycle    = -1;   // cycles since reset was released
  int stores   = 0;

  mips_top dut (
    .clk       (clk),
    .reset     (reset),
    .memread   (memread),
    .memwrite  (memwrite),
    .adr       (adr),
    .writedata (writedata),
    .memdata   (memdata)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- event counters
  int state_seen [16];
  int beq_taken = 0, beq_not_taken = 0;
  int fn_seen [string];

  always @(posedge clk) if (!reset) begin
    state_t s;
    s = dut.u_mips.state;
    state_seen[s]++;
    if (s == BEQEX) begin
      if (dut.u_mips.areg == dut.u_mips.wrd) beq_taken++;
      else beq_not_taken++;
    end
    if (s == RTYPEEX)
      case (dut.u_mips.funct)
        FN_ADD: fn_seen["add"]++;
        FN_SUB: fn_seen["sub"]++;
        FN_AND: fn_seen["and"]++;
        FN_OR:  fn_seen["or"]++;
        FN_SLT: fn_seen["slt"]++;
        default: ;
      endcase
  end

  // ---------------------------------------------------------------- store monitor
  always @(negedge clk) if (!reset) begin
    cycle++;
    if (memwrite) begin
      stores++;
      check(adr == 8'd5 && writedata == 8'd7,
            $sformatf("store adr=%0d data=%0d, expected adr=5 data=7", adr, writedata));
      if (adr == 8'd5 && writedata == 8'd7) $display("Simulation completely successful");
      else $display("Simulation failed");
      check(cycle == 104, $sformatf("store in cycle %0d, expected 104", cycle));
    end
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus and final checks
  initial begin
    logic [7:0] expreg [8];
    expreg = '{8'd0, 8'd5, 8'd5, 8'd12, 8'd7, 8'd11, 8'd1, 8'd7};

    reset = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // Program runs 104 cycles to its store, then spins; give it 100 cycles more.
    repeat (210) @(posedge clk);
    @(negedge clk);

    check(stores == 1, $sformatf("%0d stores, expected 1", stores));
    for (int r = 1; r < 8; r++)
      check(dut.u_mips.regfile[r] == expreg[r],
            $sformatf("$%0d = %0d, expected %0d", r, dut.u_mips.regfile[r], expreg[r]));
    check(dut.u_exmem.ram[1] == 32'h8007_0050,
          $sformatf("memory word 1 = %h, expected 80070050", dut.u_exmem.ram[1]));
    check(dut.u_mips.state inside {FETCH1, FETCH2, FETCH3, FETCH4, DECODE, JEX} &&
          dut.u_mips.pc >= 8'h48 && dut.u_mips.pc <= 8'h4c, "processor spins on the final jump");

    // Every state and mechanism must have occurred.
    for (int s = int'(FETCH1); s <= int'(ADDIEX); s++)
      check(state_seen[s] > 0, $sformatf("state %s never entered", state_t'(s)));
    check(beq_taken > 0,     "no beq was taken");
    check(beq_not_taken > 0, "no beq fell through");
    foreach (fn_seen[k]) $display("R-type %s executed %0d times", k, fn_seen[k]);
    check(fn_seen.num() == 5, $sformatf("only %0d of 5 R-type functions executed", fn_seen.num()));
    $display("beq taken %0d, not taken %0d; lb %0d, sb %0d, addi %0d, j %0d", beq_taken,
             beq_not_taken, state_seen[LBWR], state_seen[SBWR], state_seen[ADDIEX],
             state_seen[JEX]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
