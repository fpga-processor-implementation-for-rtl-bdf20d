// fkp_microstore: the run program of the Forward Kinematic Processor.
//
// A read-only table of PROG_LEN (29) three-address instructions that compute
// the 12 terms of the thumb's forward-kinematic matrix (normal N, sliding S,
// approach A and position P vectors) from the DH constants in r2..r6
// (a0, a1, a2, a3, d1) and the joint angles in r7..r10 (theta1..theta4).
// Common terms are computed once and reused: 7 additions, 1 extra addition
// that clears r28, 3 subtractions, 10 multiplications, 4 cosines, 4 sines.
// The results land in r20..r31: Nx Ny Nz Sx Sy Sz Ax Ay Az Px Py Pz.
//
// Interface: step selects an entry (0-based); instr is that instruction,
// combinationally; last is high for the final entry. Steps beyond the program
// read as a harmless r28 <= 0 + 0.
//
// The order of operations and the register assignment follow the original
// program; step 3 reads theta2 (r8) as the formula sin(theta2) requires.
module fkp_microstore
  import fkp_pkg::*;
(
  input  logic [4:0] step,
  output instr_t     instr,
  output logic       last
);

  always_comb begin
    unique case (step)
      //                        op        rd     rs1    rs2
      5'd0:  instr = '{OP_SIN,  R_AX,  R_TH1, R_ZERO}; // r26 = sin th1
      5'd1:  instr = '{OP_COS,  5'd11, R_TH1, R_ZERO}; // r11 = cos th1
      5'd2:  instr = '{OP_SIN,  5'd12, R_TH2, R_ZERO}; // r12 = sin th2
      5'd3:  instr = '{OP_COS,  5'd13, R_TH2, R_ZERO}; // r13 = cos th2
      5'd4:  instr = '{OP_ADD,  5'd14, R_TH2, R_TH3 }; // r14 = th2+th3
      5'd5:  instr = '{OP_SIN,  5'd15, 5'd14, R_ZERO}; // r15 = sin(th2+th3)
      5'd6:  instr = '{OP_COS,  5'd16, 5'd14, R_ZERO}; // r16 = cos(th2+th3)
      5'd7:  instr = '{OP_ADD,  5'd14, 5'd14, R_TH4 }; // r14 = th2+th3+th4
      5'd8:  instr = '{OP_SIN,  R_NZ,  5'd14, R_ZERO}; // r22 = sin th234
      5'd9:  instr = '{OP_COS,  R_SZ,  5'd14, R_ZERO}; // r25 = cos th234
      5'd10: instr = '{OP_MULT, R_NX,  5'd11, R_SZ  }; // r20 = c1 c234
      5'd11: instr = '{OP_MULT, R_NY,  R_AX,  R_SZ  }; // r21 = s1 c234
      5'd12: instr = '{OP_MULT, R_SX,  5'd11, R_NZ  }; // r23 = c1 s234
      5'd13: instr = '{OP_SUB,  R_SX,  R_ZERO, R_SX }; // r23 = -c1 s234
      5'd14: instr = '{OP_MULT, R_SY,  R_AX,  R_NZ  }; // r24 = s1 s234
      5'd15: instr = '{OP_SUB,  R_SY,  R_ZERO, R_SY }; // r24 = -s1 s234
      5'd16: instr = '{OP_SUB,  R_AY,  R_ZERO, 5'd11}; // r27 = -c1
      5'd17: instr = '{OP_ADD,  R_AZ,  R_ZERO, R_ZERO}; // r28 = 0
      5'd18: instr = '{OP_MULT, 5'd17, R_A2,  5'd13 }; // r17 = a2 c2
      5'd19: instr = '{OP_MULT, 5'd18, R_A3,  5'd16 }; // r18 = a3 c23
      5'd20: instr = '{OP_ADD,  5'd17, 5'd17, 5'd18 }; // r17 = a2 c2 + a3 c23
      5'd21: instr = '{OP_ADD,  5'd17, 5'd17, R_A1  }; // r17 += a1
      5'd22: instr = '{OP_MULT, 5'd18, 5'd17, 5'd11 }; // r18 = c1 r17
      5'd23: instr = '{OP_ADD,  R_PX,  5'd18, R_A0  }; // r29 = a0 + c1 r17
      5'd24: instr = '{OP_MULT, R_PY,  5'd17, R_AX  }; // r30 = s1 r17
      5'd25: instr = '{OP_MULT, 5'd19, R_A2,  5'd12 }; // r19 = a2 s2
      5'd26: instr = '{OP_MULT, R_PZ,  R_A3,  5'd15 }; // r31 = a3 s23
      5'd27: instr = '{OP_ADD,  R_PZ,  R_PZ,  5'd19 }; // r31 += a2 s2
      5'd28: instr = '{OP_ADD,  R_PZ,  R_PZ,  R_D1  }; // r31 += d1
      default: instr = '{OP_ADD, R_AZ, R_ZERO, R_ZERO};
    endcase
  end

  assign last = (step == 5'(PROG_LEN - 1));

endmodule
