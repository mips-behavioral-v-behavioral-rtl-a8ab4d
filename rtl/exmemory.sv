// exmemory -- byte-addressed code and data memory for the 8-bit subset-MIPS processor.
//
// The memory holds 2^(WIDTH-2) 32-bit words, so with WIDTH = 8 it covers the processor's whole
// 256-byte address space. adr[WIDTH-1:2] picks a word and adr[1:0] a byte in it, big-endian:
// byte 0 is word bits 31:24, byte 3 is bits 7:0. A 32-bit instruction stored as one hex word
// is therefore fetched opcode byte first.
//
// Reads are combinational: memdata follows adr in the same cycle. A write stores writedata into
// the addressed byte at the rising clock edge when memwrite is high; the other three bytes of the
// word keep their value. There is no read enable; the processor's memread is not needed here.
//
// The word array is loaded at time zero from the hex file INIT_FILE, one 32-bit word per line
// (an empty name leaves it unloaded). The organisation, the sizes, the byte-wide ports and the
// file load follow the original model; the byte order of writes is made the same as that of
// reads so that a stored byte reads back at the address it was written to.
module exmemory #(
  parameter int    WIDTH     = 8,
  parameter string INIT_FILE = "rtl/memfile.dat"
) (
  input  logic             clk,
  input  logic             memwrite,
  input  logic [WIDTH-1:0] adr,
  input  logic [WIDTH-1:0] writedata,
  output logic [WIDTH-1:0] memdata
);

  localparam int WORDS = 1 << (WIDTH - 2);

  logic [31:0] ram [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, ram);
  end

  logic [WIDTH-3:0] wadr;
  logic [1:0]       lane;
  logic [31:0]      word;
  assign wadr = adr[WIDTH-1:2];
  assign lane = adr[1:0];
  assign word = ram[wadr];

  always_ff @(posedge clk) begin
    if (memwrite) begin
      unique case (lane)
        2'b00: ram[wadr][31:24] <= writedata[7:0];
        2'b01: ram[wadr][23:16] <= writedata[7:0];
        2'b10: ram[wadr][15:8]  <= writedata[7:0];
        2'b11: ram[wadr][7:0]   <= writedata[7:0];
      endcase
    end
  end

  always_comb begin
    memdata = '0;
    unique case (lane)
      2'b00: memdata[7:0] = word[31:24];
      2'b01: memdata[7:0] = word[23:16];
      2'b10: memdata[7:0] = word[15:8];
      2'b11: memdata[7:0] = word[7:0];
    endcase
  end

endmodule
