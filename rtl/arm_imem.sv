// arm_imem: instruction memory (the instruction cache of the model).
//
// The core has separate instruction and data memories. Instructions are 32-bit
// words at word-aligned addresses (Thumb is not executed), so this is an array
// of 2**(ADDR_BITS-2) words read combinationally by the fetch stage: the word
// at `fetch_addr` appears on `instr` in the same cycle (one-cycle fetch, no
// misses). Addresses wrap modulo the memory size. A write port fills the
// memory with a program before the core leaves reset.
// Size: the description gives none; 64 KiB covers programs linked at 0x8000 as
// in its examples.
module arm_imem #(
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic        clk,
  input  logic [31:0] fetch_addr,
  output logic [31:0] instr,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);
  localparam int unsigned WORDS = 2 ** (ADDR_BITS - 2);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[ADDR_BITS-1:2]] <= load_data;
  end

  assign instr = mem[fetch_addr[ADDR_BITS-1:2]];
endmodule
