// cos_sin_unit_tb: self-checking test of the cosine/sine lookup unit.
//
// The unit is connected to the ROM model with a 4-clock access time. For every
// wait-state setting 0..7 and a set of angles (random and edge values, both
// functions) it checks the ROM address format {sel, sign, a[10:0]}, the ready
// latency of wait_states+3 clock edges from the drive of go, and the result:
// the ROM word when wait_states+1 >= 4, the model's not-yet-valid marker when
// the unit was given too few wait states.
module cos_sin_unit_tb;
  import fkp_pkg::*;
  import fkp_tb_pkg::*;

  localparam int unsigned ACCESS = 4;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  fix16_t            a_bus = '0;
  logic              go = 1'b0, sel = 1'b0;
  logic [WAIT_W-1:0] wait_states = '0;
  logic              ready;
  fix16_t            c_bus, rom_data;
  logic [ROM_AW-1:0] rom_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cos_sin_unit dut (.*);
  cos_sin_rom_model #(.ACCESS_CYCLES(ACCESS)) u_rom (.clk(clk), .addr(rom_addr), .data(rom_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic lookup(input fix16_t ang, input logic s, input int w);
    int cyc;
    logic [12:0] exp_addr;
    fix16_t exp_val;
    @(negedge clk);
    a_bus = ang; sel = s; wait_states = w[2:0]; go = 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!ready && cyc < 50);
    go = 1'b0;
    exp_addr = {s, ang[15], ang[10:0]};
    exp_val  = (w + 1 >= ACCESS) ? rom_word(exp_addr) : 16'sh5A5A;
    check(rom_addr == exp_addr, $sformatf("rom_addr %h exp %h", rom_addr, exp_addr));
    check(cyc == w + 3, $sformatf("latency %0d exp %0d (wait %0d)", cyc, w + 3, w));
    check(c_bus == exp_val, $sformatf("%s(%h) wait %0d = %h exp %h",
                                      s ? "sin" : "cos", ang, w, c_bus, exp_val));
    // ready is a single-clock pulse
    @(negedge clk);
    check(!ready, "ready longer than one clock");
  endtask

  initial begin
    fix16_t ang;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 8; w++) begin
      lookup(16'sh0010 + 16'(w), 1'b0, w);
      lookup(16'sh0192 + 16'(w), 1'b1, w);  // ~ +pi/2
      lookup(-16'sh0192 - 16'(w), 1'b0, w); // ~ -pi/2
      lookup(16'sh07FF - 16'(w), 1'b1, w);  // top of the address range
      for (int k = 0; k < 12; k++) begin
        ang = fix16_t'($signed(12'($urandom)));
        lookup(ang, k[0], w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
