// arm_top: the ARM core model as a system: the 5-stage pipelined core with its
// separate instruction memory and data memory (Harvard organisation).
//
// The core fetches one instruction per cycle from arm_imem and performs at most
// one data access per cycle on arm_dmem, both completing in the same cycle (no
// wait states), as in the cycle-accurate model this design follows. A test
// bench or loader fills the instruction memory (and, if it wants, the data
// memory) through the load ports while rst_n is low, then releases reset; the
// core starts at address RESET_PC in Supervisor mode.
// Ports: load ports of both memories; debug reads of a physical register and a
// data-memory word; the fetch PC, the CPSR and the event counters (cycles,
// retired instructions, forwarding, interlock and lock cycles, branches).
// Memory sizes are this design's choice (the description gives none).
module arm_top
  import arm_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_BITS = 16,
  parameter int unsigned DMEM_ADDR_BITS = 16,
  parameter logic [31:0] RESET_PC       = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        iload_we,
  input  logic [31:0] iload_addr,
  input  logic [31:0] iload_data,
  input  logic        dload_we,
  input  logic [31:0] dload_addr,
  input  logic [31:0] dload_data,
  input  preg_t       dbg_reg,
  output logic [31:0] dbg_reg_val,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_mem_val,
  output logic [31:0] pc,
  output psr_t        cpsr,
  output perf_t       perf
);
  logic [31:0] if_addr, if_instr;
  logic [31:0] d_addr, d_rdata, d_wdata;
  logic        d_we;
  logic [3:0]  d_be;

  arm_core #(.RESET_PC(RESET_PC)) u_core (
    .clk, .rst_n,
    .if_addr, .if_instr,
    .d_addr, .d_rdata, .d_we, .d_be, .d_wdata,
    .dbg_reg, .dbg_reg_val, .pc, .cpsr, .perf
  );

  arm_imem #(.ADDR_BITS(IMEM_ADDR_BITS)) u_imem (
    .clk, .fetch_addr(if_addr), .instr(if_instr),
    .load_we(iload_we), .load_addr(iload_addr), .load_data(iload_data)
  );

  arm_dmem #(.ADDR_BITS(DMEM_ADDR_BITS)) u_dmem (
    .clk, .addr(d_addr), .rdata(d_rdata), .we(d_we), .be(d_be), .wdata(d_wdata),
    .load_we(dload_we), .load_addr(dload_addr), .load_data(dload_data),
    .dbg_addr, .dbg_rdata(dbg_mem_val)
  );
endmodule
