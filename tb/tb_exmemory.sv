// tb_exmemory -- self-checking test of the byte-addressed code and data memory.
//
// First the words loaded from rtl/memfile.dat are read back byte by byte and compared with the
// file's first three words written out here by hand, which checks both the load and the
// big-endian byte order (address 0 gives bits 31:24). Then 2000 random cycles each write a
// random byte (or not) and read a random address; the memory is compared with a byte-array
// model kept in the testbench, on the combinational read in the same cycle and on a full read
// of all 256 bytes at the end. A write must change only its own byte and take effect at the
// clock edge. A watchdog ends the run after 10000 cycles.
module tb_exmemory;

  logic       clk = 1'b0;
  logic       memwrite;
  logic [7:0] adr, writedata, memdata;

  int checks   = 0;
  int failures = 0;

  exmemory dut (
    .clk       (clk),
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
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model [256];
  logic [7:0] head [12] = '{8'h80, 8'h02, 8'h00, 8'h54,
                            8'h80, 8'h07, 8'h00, 8'h50,
                            8'h80, 8'he3, 8'h00, 8'h55};

  initial begin
    void'($urandom(3));
    memwrite  = 1'b0;
    adr       = '0;
    writedata = '0;
    @(negedge clk);

    // Preloaded contents, byte order.
    for (int i = 0; i < 12; i++) begin
      adr = 8'(i);
      #1;
      check(memdata == head[i], $sformatf("preload byte %0d = %h, expected %h", i, memdata,
                                          head[i]));
    end

    // Take a snapshot of the whole memory as the model's starting point.
    for (int i = 0; i < 256; i++) begin
      adr = 8'(i);
      #1;
      model[i] = memdata;
    end

    // Random writes and reads.
    for (int t = 0; t < 2000; t++) begin
      logic [7:0] wa, wd;
      logic       we;
      @(negedge clk);
      we = ($urandom_range(0, 2) != 0);
      wa = 8'($urandom());
      wd = 8'($urandom());
      memwrite  = we;
      adr       = wa;
      writedata = wd;
      #1;
      check(memdata == model[wa], $sformatf("read before write at %0d: %h, expected %h", wa,
                                            memdata, model[wa]));
      @(posedge clk);
      #1;
      if (we) model[wa] = wd;
      memwrite = 1'b0;
      adr = 8'($urandom());
      #1;
      check(memdata == model[adr], $sformatf("read at %0d: %h, expected %h", adr, memdata,
                                             model[adr]));
    end

    for (int i = 0; i < 256; i++) begin
      adr = 8'(i);
      #1;
      check(memdata == model[i], $sformatf("final byte %0d = %h, expected %h", i, memdata,
                                           model[i]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
