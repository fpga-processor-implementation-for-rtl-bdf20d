// fkp_core_tb: self-checking test of the processor datapath.
//
// The testbench plays the control unit: it drives the core's control inputs
// clock by clock to move words in, run each kind of instruction (cosine,
// sine, add, subtract, multiply) between registers and move words out, with
// the ROM model attached (4-clock access, 3 wait states). Each result read
// back through the output latch is compared with the reference arithmetic.
// It also checks that moving a word into r0 or r1 leaves them at 0.0 and 1.0.
module fkp_core_tb;
  import fkp_pkg::*;
  import fkp_tb_pkg::*;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  fix16_t            data_in = '0, data_out, rom_data;
  logic              data_in_latch = 0, data_out_latch = 0, c_reg_latch = 0;
  raddr_t            c_reg_addr = '0, a_reg_addr = '0, b_reg_addr = '0;
  logic              cos_sin_ready, cos_sin_go = 0, cos_sin_sel = 0;
  logic [WAIT_W-1:0] cos_sin_wait = 3'd3;
  logic [ROM_AW-1:0] rom_addr;
  logic              adder_go = 0, adder_sel = 0, adder_done, mult_go = 0, mult_done;
  mux_sel_e          mux_sel = MUX_DATA_IN;
  fix16_t            model [NREGS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fkp_core dut (.*);
  cos_sin_rom_model #(.ACCESS_CYCLES(4)) u_rom (.clk(clk), .addr(rom_addr), .data(rom_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic move_in(input raddr_t r, input fix16_t v);
    @(negedge clk);
    data_in = v; mux_sel = MUX_DATA_IN; c_reg_addr = r; data_in_latch = 1;
    @(negedge clk);
    data_in_latch = 0; data_in = ~v;      // latch must hold the word
    @(negedge clk);
    c_reg_latch = 1;
    @(negedge clk);
    c_reg_latch = 0;
    if (r > 1) model[r] = v;
  endtask

  task automatic move_out(input raddr_t r);
    @(negedge clk);
    b_reg_addr = r;
    @(negedge clk);
    data_out_latch = 1;
    @(negedge clk);
    data_out_latch = 0;
    b_reg_addr = ~r;                      // output latch must hold the word
    @(negedge clk);
    check(data_out == model[r], $sformatf("r%0d out %h exp %h", r, data_out, model[r]));
  endtask

  // op: 0 cos, 1 sin, 2 add, 3 sub, 4 mult
  task automatic exec(input int op, input raddr_t rd, input raddr_t rs1, input raddr_t rs2);
    int cyc = 0;
    fix16_t a, b;
    @(negedge clk);
    a_reg_addr = rs1; b_reg_addr = rs2; c_reg_addr = rd;
    cos_sin_sel = (op == 1); adder_sel = (op == 3);
    mux_sel = (op < 2) ? MUX_COS_SIN : (op < 4) ? MUX_ADDER : MUX_MULT;
    @(negedge clk);
    cos_sin_go = (op < 2); adder_go = (op == 2 || op == 3); mult_go = (op == 4);
    do begin
      @(posedge clk); cyc++;
    end while (!((op < 2 && cos_sin_ready) || (op inside {2, 3} && adder_done) ||
                 (op == 4 && mult_done)) && cyc < 2000);
    @(negedge clk);
    cos_sin_go = 0; adder_go = 0; mult_go = 0; c_reg_latch = 1;
    @(negedge clk);
    c_reg_latch = 0;
    a = model[rs1]; b = model[rs2];
    unique case (op)
      0: model[rd] = fx_cos(a);
      1: model[rd] = fx_sin(a);
      2: model[rd] = a + b;
      3: model[rd] = a - b;
      default: model[rd] = fx_mul(a, b);
    endcase
    move_out(rd);
  endtask

  initial begin
    foreach (model[i]) model[i] = FIX_ZERO;
    model[1] = FIX_ONE;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    move_in(0, 16'sh1234);
    move_in(1, 16'sh4321);
    move_out(0);
    move_out(1);
    for (int t = 0; t < 6; t++) begin
      for (int i = 2; i < 8; i++) move_in(raddr_t'(i), fix16_t'($signed(11'($urandom))));
      exec(0, 10, 2, 0);
      exec(1, 11, 3, 0);
      exec(2, 12, 4, 5);
      exec(3, 13, 6, 7);
      exec(3, 14, 0, 13);
      exec(4, 15, 10, 11);
      exec(4, 16, 4, 14);
      exec(2, 17, 1, 1);
      exec(1, 18, 17, 0);
    end
    move_out(0);
    move_out(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
