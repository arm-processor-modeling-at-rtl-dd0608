// arm_psr: current program status register (CPSR) and the five banked saved
// program status registers (SPSR_fiq, _irq, _svc, _abt, _und).
//
// User and System mode have no SPSR: reading it there returns the CPSR and a
// write is ignored. The pipeline updates the CPSR from the EXE stage (flags of
// data-processing and multiply instructions, MSR, BX/BLX, SWI, BKPT, CPSR<-SPSR
// on a data-processing write to the PC) and from the MEM stage (LDM with S bit
// loading the PC, and the T bit of a load into the PC). Both can be requested
// in one cycle only for instructions that the MEM-stage branch cancels, so the
// MEM write has priority. SPSR writes come from the EXE stage only (MSR, and
// SWI/BKPT saving the CPSR into the SPSR of the mode they enter).
// `spsr` is the SPSR of the current mode; `spsr_of` reads that of any mode.
// Reset: Supervisor mode, IRQ and FIQ disabled, flags clear (the ARM reset
// state); SPSRs reset to zero.
module arm_psr
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpsr_we,
  input  psr_t        cpsr_wd,
  input  logic        spsr_we,
  input  logic [4:0]  spsr_wmode,   // bank to write
  input  psr_t        spsr_wd,
  output psr_t        cpsr,
  output psr_t        spsr,
  input  logic [4:0]  rmode,
  output psr_t        spsr_of
);
  psr_t spsr_bank [5];

  function automatic int bank(input logic [4:0] m);
    unique case (m)
      MODE_FIQ: return 0;
      MODE_IRQ: return 1;
      MODE_SVC: return 2;
      MODE_ABT: return 3;
      MODE_UND: return 4;
      default:  return 5;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpsr <= '{mode: MODE_SVC, i: 1'b1, f: 1'b1, default: '0};
      for (int k = 0; k < 5; k++) spsr_bank[k] <= '0;
    end else begin
      if (cpsr_we) cpsr <= cpsr_wd;
      if (spsr_we && bank(spsr_wmode) < 5) spsr_bank[bank(spsr_wmode)] <= spsr_wd;
    end
  end

  always_comb begin
    spsr    = (bank(cpsr.mode) < 5) ? spsr_bank[bank(cpsr.mode)] : cpsr;
    spsr_of = (bank(rmode) < 5)     ? spsr_bank[bank(rmode)]     : cpsr;
  end
endmodule
