// arm_dmem: data memory (the data cache of the model), little-endian.
//
// An array of 2**(ADDR_BITS-2) 32-bit words. The MEM stage reads the word that
// holds `addr` combinationally (the stage extracts and extends bytes and
// halfwords itself) and writes on the clock edge with per-byte enables, so a
// load or store completes in the one MEM cycle. Addresses wrap modulo the
// memory size. A second write port and a read port let a test bench preload
// and inspect memory. The write port of the core wins over the preload port.
// Size: the description gives none; 64 KiB is this design's choice.
module arm_dmem #(
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_rdata
);
  localparam int unsigned WORDS = 2 ** (ADDR_BITS - 2);
  logic [31:0] mem [WORDS];
  logic [ADDR_BITS-3:0] wi, li;

  assign wi = addr[ADDR_BITS-1:2];
  assign li = load_addr[ADDR_BITS-1:2];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[wi][8*b +: 8] <= wdata[8*b +: 8];
    end else if (load_we) begin
      mem[li] <= load_data;
    end
  end

  assign rdata     = mem[wi];
  assign dbg_rdata = mem[dbg_addr[ADDR_BITS-1:2]];
endmodule
