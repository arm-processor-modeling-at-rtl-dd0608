// arm_decoder: instruction decode of the ID stage.
//
// Classifies a 32-bit ARM instruction (architecture v5 encodings) into the
// instruction class the later stages act on ("TYPE"/"OPERATE") and says which
// registers the three read ports must read:
//   A  <- Rn   (data processing, loads/stores, SWP, LDM/STM base),
//         MUL_Rn (accumulator of MLA)
//   Bb <- Rm   (register operand, register offset, multiplier operand, SWP
//               data, BX/BLX/CLZ/MSR source)
//   C  <- Rs   (register-specified shift, multiplier), Rd (store data)
// Special cases handled by the pipeline: UMLAL/SMLAL read Rm and Rs in their
// first ID cycle and RdLo/RdHi in their second; STM reads one register Ri per
// ID cycle through C.
// Coprocessor instructions (LDC, STC, CDP, MCR, MRC), LDRD/STRD, the enhanced
// DSP instructions and undefined encodings decode as C_NOP and are executed as
// no-operations: the description does not implement them. MOV and MVN do not
// read Rn. Combinational.
module arm_decoder
  import arm_pkg::*;
(
  input  logic [31:0] ir,
  output iclass_e     cls,
  output srcsel_t     sel,
  output logic        c_is_store,   // C carries store data (used in MEM)
  output logic        b_is_swp      // Bb is the SWP data register (used in MEM)
);
  logic [3:0] rn, rd, rs, rm;
  assign rn = ir[19:16];
  assign rd = ir[15:12];
  assign rs = ir[11:8];
  assign rm = ir[3:0];

  always_comb begin
    cls = C_NOP;
    if (ir[31:28] == 4'hF) begin
      if (ir[27:25] == 3'b101) cls = C_BLX1;
    end else begin
      unique case (ir[27:25])
        3'b000: begin
          if (ir[7:4] == 4'b1001) begin
            if (ir[24:22] == 3'b000)                        cls = C_MUL;
            else if (ir[24:23] == 2'b01)                    cls = ir[21] ? C_MLAL : C_MULL;
            else if (ir[24:23] == 2'b10 && ir[21:20] == 2'b00) cls = C_SWP;
          end else if (ir[7] && ir[4]) begin
            // extra loads/stores; LDRD/STRD (L=0 with S=1) are not implemented
            if (ir[20] || !ir[6]) cls = C_LDSTH;
          end else if (ir[24:23] == 2'b10 && !ir[20]) begin
            unique case (ir[7:4])
              4'b0000: cls = ir[21] ? C_MSR : C_MRS;
              4'b0001: begin
                if (ir[22:21] == 2'b01)      cls = C_BX;
                else if (ir[22:21] == 2'b11) cls = C_CLZ;
              end
              4'b0011: if (ir[22:21] == 2'b01) cls = C_BLX2;
              4'b0111: if (ir[22:21] == 2'b01) cls = C_BKPT;
              default: cls = C_NOP;
            endcase
          end else begin
            cls = C_DP;
          end
        end
        3'b001: begin
          if (ir[24:23] == 2'b10 && !ir[20]) cls = ir[21] ? C_MSR : C_NOP;
          else                               cls = C_DP;
        end
        3'b010: cls = C_LDST;
        3'b011: cls = ir[4] ? C_NOP : C_LDST;
        3'b100: cls = (ir[15:0] == 16'd0) ? C_NOP : (ir[20] ? C_LDM : C_STM);
        3'b101: cls = C_B;
        3'b110: cls = C_NOP;                      // LDC/STC
        default: cls = ir[24] ? C_SWI : C_NOP;     // CDP/MCR/MRC
      endcase
    end
  end

  always_comb begin
    sel = '0;
    c_is_store = 1'b0;
    b_is_swp   = 1'b0;
    unique case (cls)
      C_DP: begin
        sel.a_used = !(ir[24:21] inside {4'hD, 4'hF});
        sel.a_reg  = rn;
        sel.b_used = !ir[25];
        sel.b_reg  = rm;
        sel.c_used = !ir[25] && ir[4];
        sel.c_reg  = rs;
      end
      C_MSR: begin
        sel.b_used = !ir[25];
        sel.b_reg  = rm;
      end
      C_BX, C_BLX2, C_CLZ: begin
        sel.b_used = 1'b1;
        sel.b_reg  = rm;
      end
      C_MUL: begin
        sel.a_used = ir[21];
        sel.a_reg  = rd;          // MUL_Rn sits in bits 15:12
        sel.b_used = 1'b1; sel.b_reg = rm;
        sel.c_used = 1'b1; sel.c_reg = rs;
      end
      C_MULL, C_MLAL: begin
        sel.b_used = 1'b1; sel.b_reg = rm;
        sel.c_used = 1'b1; sel.c_reg = rs;
      end
      C_SWP: begin
        sel.a_used = 1'b1; sel.a_reg = rn;
        sel.b_used = 1'b1; sel.b_reg = rm;
        b_is_swp   = 1'b1;
      end
      C_LDST: begin
        sel.a_used = 1'b1; sel.a_reg = rn;
        sel.b_used = ir[25]; sel.b_reg = rm;
        sel.c_used = !ir[20]; sel.c_reg = rd;
        c_is_store = !ir[20];
      end
      C_LDSTH: begin
        sel.a_used = 1'b1; sel.a_reg = rn;
        sel.b_used = !ir[22]; sel.b_reg = rm;
        sel.c_used = !ir[20]; sel.c_reg = rd;
        c_is_store = !ir[20];
      end
      C_LDM: begin
        sel.a_used = 1'b1; sel.a_reg = rn;
      end
      C_STM: begin
        sel.a_used = 1'b1; sel.a_reg = rn;
        sel.c_used = 1'b1;        // Ri, chosen by the pipeline
        c_is_store = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
