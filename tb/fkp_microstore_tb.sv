// fkp_microstore_tb: self-checking test of the run program.
//
// Reads the whole program out of the microstore and executes it symbolically
// in real arithmetic (cosine, sine, add, subtract, multiply on a 32-entry
// array with r0 = 0 and r1 = 1), for many random sets of DH constants and
// joint angles. The 12 results in r20..r31 must equal the closed-form
// transform of the thumb. Also checks the operation mix (4 cosines, 4 sines,
// 8 additions, 3 subtractions, 10 multiplications), that no instruction reads
// a register before the program or the host has written it, that no
// instruction writes r0..r10, and that `last` marks only the final entry.
module fkp_microstore_tb;
  import fkp_pkg::*;
  import fkp_tb_pkg::*;

  logic [4:0] step = '0;
  instr_t     instr;
  logic       last;
  instr_t     prog [PROG_LEN];
  int checks = 0, failures = 0;

  fkp_microstore dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n_cos = 0, n_sin = 0, n_add = 0, n_sub = 0, n_mul = 0;
    bit written [NREGS];
    real r [NREGS];
    nsap_real_t ref_v;
    real k [9];

    for (int s = 0; s < 32; s++) begin
      step = 5'(s);
      #1;
      if (s < PROG_LEN) prog[s] = instr;
      check(last == (s == PROG_LEN - 1), $sformatf("last at step %0d", s));
    end

    foreach (written[i]) written[i] = (i <= 10);
    foreach (prog[s]) begin
      unique case (prog[s].op)
        OP_COS:  n_cos++;
        OP_SIN:  n_sin++;
        OP_ADD:  n_add++;
        OP_SUB:  n_sub++;
        OP_MULT: n_mul++;
        default: check(1'b0, $sformatf("step %0d: opcode %0d in run program", s, prog[s].op));
      endcase
      check(written[prog[s].rs1], $sformatf("step %0d reads r%0d before it is written", s, prog[s].rs1));
      if (prog[s].op inside {OP_ADD, OP_SUB, OP_MULT})
        check(written[prog[s].rs2], $sformatf("step %0d reads r%0d before it is written", s, prog[s].rs2));
      check(prog[s].rd > 10, $sformatf("step %0d overwrites input register r%0d", s, prog[s].rd));
      written[prog[s].rd] = 1'b1;
    end
    check(n_cos == 4 && n_sin == 4, $sformatf("%0d cos %0d sin", n_cos, n_sin));
    check(n_add == 8 && n_sub == 3 && n_mul == 10,
          $sformatf("%0d add %0d sub %0d mult", n_add, n_sub, n_mul));

    for (int t = 0; t < 50; t++) begin
      foreach (k[i]) k[i] = (real'($urandom % 20001) - 10000.0) / 2500.0;
      foreach (r[i]) r[i] = 123.0;  // garbage in all scratch registers
      r[0] = 0.0; r[1] = 1.0;
      for (int i = 0; i < 9; i++) r[2 + i] = k[i];
      foreach (prog[s]) begin
        unique case (prog[s].op)
          OP_COS:  r[prog[s].rd] = $cos(r[prog[s].rs1]);
          OP_SIN:  r[prog[s].rd] = $sin(r[prog[s].rs1]);
          OP_ADD:  r[prog[s].rd] = r[prog[s].rs1] + r[prog[s].rs2];
          OP_SUB:  r[prog[s].rd] = r[prog[s].rs1] - r[prog[s].rs2];
          OP_MULT: r[prog[s].rd] = r[prog[s].rs1] * r[prog[s].rs2];
          default: ;
        endcase
      end
      ref_v = fk_real(k[0], k[1], k[2], k[3], k[4], k[5], k[6], k[7], k[8]);
      for (int i = 0; i < 12; i++) begin
        real d;
        d = r[20 + i] - ref_v[i];
        check(d < 1e-9 && d > -1e-9, $sformatf("set %0d: r%0d = %f exp %f", t, 20 + i, r[20 + i], ref_v[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
