// mips_top -- the subset-MIPS processor joined to its external code and data memory.
//
// The processor's single byte-wide memory port (adr, writedata, memwrite) drives the memory and
// the memory's combinational read byte returns as memdata. The memory is preloaded from
// INIT_FILE with a program and its data; after reset the processor starts fetching at address
// 0. The memory port is brought out so that a test harness can watch the stores, as the
// original top level does when it looks for the final store of the test program.
//
// Timing: reset is synchronous (hold it over at least one rising edge). Every instruction takes
// 6 to 8 clock cycles; a store appears as memwrite high for one cycle with its address and byte.
module mips_top #(
  parameter int    WIDTH     = 8,
  parameter int    REGBITS   = 3,
  parameter string INIT_FILE = "rtl/memfile.dat"
) (
  input  logic             clk,
  input  logic             reset,
  output logic             memread,
  output logic             memwrite,
  output logic [WIDTH-1:0] adr,
  output logic [WIDTH-1:0] writedata,
  output logic [WIDTH-1:0] memdata
);

  mips #(
    .WIDTH   (WIDTH),
    .REGBITS (REGBITS)
  ) u_mips (
    .clk       (clk),
    .reset     (reset),
    .memdata   (memdata),
    .memread   (memread),
    .memwrite  (memwrite),
    .adr       (adr),
    .writedata (writedata)
  );

  exmemory #(
    .WIDTH     (WIDTH),
    .INIT_FILE (INIT_FILE)
  ) u_exmem (
    .clk       (clk),
    .memwrite  (memwrite),
    .adr       (adr),
    .writedata (writedata),
    .memdata   (memdata)
  );

endmodule
