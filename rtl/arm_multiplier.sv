// arm_multiplier: iterative multiplier used by the EXE stage for MUL, MLA,
// UMULL, SMULL, UMLAL and SMLAL.
//
// The multiply takes a number of EXE cycles that grows with the multiplier
// operand (Rs): each cycle retires 8 bits of Rs, adding Rm * Rs[7:0] (shifted
// into place) to a 64-bit accumulator, and the operation ends as soon as the
// bits of Rs still to be processed are all zeros (or, for a signed multiply,
// all ones, in which case Rm shifted into place is subtracted once). A multiply
// therefore takes 1 to 4 cycles: 1 when Rs fits in 8 bits (signed or unsigned
// as the operation requires), 4 when it needs 25 bits or more. The pipeline
// holds IF and ID (EXE_MULLOCK) for all but the last cycle.
// The accumulator starts at 0 or at Rn (MLA). UMLAL/SMLAL run here as plain
// long multiplies: the core adds RdHi:RdLo to the product, because those two
// registers are read while the multiply is already running.
// Timing: `start` with the operands in the first EXE cycle; `done` rises
// combinationally in the last cycle together with `result`. While `en` is low
// (the pipeline is held) the state does not change. The number of cycles
// depending on the size of the operand follows the description; the 8-bit step
// and early-termination rule are this design's choice.
module arm_multiplier (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,          // advance (low while the pipeline is held)
  input  logic        start,       // first cycle of a multiply in EXE
  input  logic        signed_op,   // SMULL/SMLAL and MUL/MLA: signed operands
  input  logic        acc_en,
  input  logic [63:0] acc,         // initial accumulator
  input  logic [31:0] rm,          // multiplicand
  input  logic [31:0] rs,          // multiplier (sets the cycle count)
  output logic        busy,        // a multi-cycle multiply is in progress
  output logic        done,        // result valid this cycle
  output logic [63:0] result
);
  logic [63:0] acc_q, mc_q, mp_q;
  logic [63:0] cur_acc, cur_mc, cur_mp, sum, mc_n, mp_n;
  logic        active, fin_zero, fin_ones;

  always_comb begin
    active  = busy || start;
    cur_acc = busy ? acc_q : (acc_en ? acc : 64'd0);
    cur_mc  = busy ? mc_q  : (signed_op ? {{32{rm[31]}}, rm} : {32'd0, rm});
    cur_mp  = busy ? mp_q  : (signed_op ? {{32{rs[31]}}, rs} : {32'd0, rs});
    sum     = cur_acc + cur_mc * {56'd0, cur_mp[7:0]};
    mc_n    = cur_mc << 8;
    mp_n    = {{8{cur_mp[63]}}, cur_mp[63:8]};
    fin_zero = (mp_n == 64'd0);
    fin_ones = (mp_n == '1);
    done    = active && (fin_zero || fin_ones);
    result  = fin_ones ? (sum - mc_n) : sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      acc_q <= '0;
      mc_q  <= '0;
      mp_q  <= '0;
    end else if (en && active) begin
      busy  <= !done;
      acc_q <= sum;
      mc_q  <= mc_n;
      mp_q  <= mp_n;
    end
  end
endmodule
