// fkp_tb: end-to-end test of the Forward Kinematic Processor at its default
// (and only) size.
//
// The testbench is the host: it loads the thumb's DH constants (a0 = -0.75,
// a1 = 0.375, a2 = 1.7, a3 = 1.3, d1 = 3.125 inches) into r2..r6 once, then
// for each joint configuration loads the four angles (radians) into r7..r10,
// issues run and reads the 12 results from r20..r31 with get commands.
// Configurations: all 16 corners of the joint ranges (theta1 -45..135 deg,
// theta2 -15..60, theta3 6.5..90, theta4 0..90) and random angles inside
// them. Every result must equal the 8.8 reference computation bit for bit
// and lie within 0.04 of the closed-form real transform.
//
// The external ROM model has a 4-clock access time. Most runs use 3 wait
// states; some use 7; one run with too few wait states (1) must give wrong
// sines and cosines. Mechanisms that must each occur at least once: set,
// get, run, a run reusing constants loaded earlier, a delayed data_get_ack,
// an ignored write to r0/r1, an ignored command 11, a subtraction, a
// multiplication with a negative operand, each wait-state setting used, and
// a reset in the middle of a run (after which every register must read 0.0,
// and a reloaded configuration must compute correctly again).
module fkp_tb;
  import fkp_pkg::*;
  import fkp_tb_pkg::*;

  localparam real PI = 3.14159265358979;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic              strobe = 1'b0, data_get_ack = 1'b0;
  logic              ready, data_get_valid;
  cmd_port_t         cmd = '0;
  fix16_t            data_in = '0, data_out, rom_data;
  logic [WAIT_W-1:0] rom_wait = 3'd3;
  logic [ROM_AW-1:0] rom_addr;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_set = 0, n_get = 0, n_run = 0, n_reuse = 0, n_ack_delay = 0, n_hardwired = 0;
  int n_nop = 0, n_sub = 0, n_neg_mult = 0, n_wait3 = 0, n_wait7 = 0, n_short_wait = 0;
  int n_writes_in_run = 0, n_mid_reset = 0;

  always #20 clk = ~clk;   // 40 ns, 25 MHz

  fkp dut (.*);
  cos_sin_rom_model #(.ACCESS_CYCLES(4)) u_rom (.clk(clk), .addr(rom_addr), .data(rom_data));

  // observation of internal activity, for the mechanism counts only
  always @(posedge clk) if (!rst) begin
    if ($rose(dut.adder_go) && dut.adder_sel) n_sub++;
    if ($rose(dut.mult_go) && (dut.u_core.a_bus < 0 || dut.u_core.b_bus < 0)) n_neg_mult++;
    if (dut.u_control.state == dut.u_control.C_EX_LATCH) n_writes_in_run++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_ready();
    int cyc = 0;
    while (!ready && cyc < 100000) begin @(negedge clk); cyc++; end
    check(ready, "processor never became ready");
  endtask

  task automatic set_reg(input raddr_t r, input fix16_t v);
    wait_ready();
    cmd = '{CMD_SET, r}; data_in = v; strobe = 1'b1;
    @(negedge clk);
    while (ready) @(negedge clk);
    repeat (4) @(negedge clk);
    strobe = 1'b0;
    @(negedge clk);
    n_set++;
  endtask

  task automatic get_reg(input raddr_t r, output fix16_t v);
    int d;
    wait_ready();
    cmd = '{CMD_GET, r}; strobe = 1'b1;
    @(negedge clk);
    while (!data_get_valid) @(negedge clk);
    v = data_out;
    d = $urandom % 3;
    if (d > 0) n_ack_delay++;
    repeat (d) @(negedge clk);
    data_get_ack = 1'b1;
    while (data_get_valid) @(negedge clk);
    data_get_ack = 1'b0;
    strobe = 1'b0;
    @(negedge clk);
    n_get++;
  endtask

  task automatic run_cmd(output int cycles);
    int w0;
    wait_ready();
    w0 = n_writes_in_run;
    cmd = '{CMD_RUN, 5'd0}; strobe = 1'b1;
    @(negedge clk);
    cycles = 1;
    while (n_writes_in_run - w0 < 29 && cycles < 100000) begin @(negedge clk); cycles++; end
    @(negedge clk);
    check(!ready, "ready raised while strobe still high");
    strobe = 1'b0;
    @(negedge clk);
    check(ready, "ready not raised after run");
    check(n_writes_in_run - w0 == 29,
          $sformatf("run executed %0d instructions, exp 29", n_writes_in_run - w0));
    n_run++;
  endtask

  fix16_t kc [5];
  real    kr [5] = '{-0.75, 0.375, 1.7, 1.3, 3.125};

  task automatic one_config(input real t1d, t2d, t3d, t4d, input bit expect_exact);
    fix16_t th [4];
    real    thr [4];
    nsap_t  exp_fx;
    nsap_real_t exp_r;
    fix16_t got;
    int     cyc, wrong = 0;
    thr = '{t1d * PI / 180.0, t2d * PI / 180.0, t3d * PI / 180.0, t4d * PI / 180.0};
    foreach (th[i]) th[i] = from_real(thr[i]);
    for (int i = 0; i < 4; i++) set_reg(raddr_t'(7 + i), th[i]);
    if (n_run > 0) n_reuse++;
    run_cmd(cyc);
    // 10 multiplies of 580 clocks, 11 additions of 20, 8 lookups of 5 + wait,
    // 29 setup clocks, counted from the strobe to the last register write
    check(cyc == 10 * 580 + 11 * 20 + 8 * (5 + int'(rom_wait)) + 29 + 1,
          $sformatf("run took %0d clocks with %0d wait states", cyc, rom_wait));
    exp_fx = fk_fixed(kc[0], kc[1], kc[2], kc[3], kc[4], th[0], th[1], th[2], th[3]);
    exp_r  = fk_real(to_real(kc[0]), to_real(kc[1]), to_real(kc[2]), to_real(kc[3]),
                     to_real(kc[4]), to_real(th[0]), to_real(th[1]), to_real(th[2]),
                     to_real(th[3]));
    for (int i = 0; i < 12; i++) begin
      real d;
      get_reg(raddr_t'(20 + i), got);
      d = to_real(got) - exp_r[i];
      if (expect_exact) begin
        check(got == exp_fx[i], $sformatf("(%0.1f,%0.1f,%0.1f,%0.1f) r%0d = %h exp %h",
                                          t1d, t2d, t3d, t4d, 20 + i, got, exp_fx[i]));
        check(d < 0.04 && d > -0.04, $sformatf("r%0d = %f, closed form %f", 20 + i,
                                               to_real(got), exp_r[i]));
      end else if (got != exp_fx[i]) wrong++;
    end
    if (!expect_exact) check(wrong > 0, "too few wait states still gave correct results");
    if (expect_exact && rom_wait == 3) n_wait3++;
    if (expect_exact && rom_wait == 7) n_wait7++;
    if (!expect_exact) n_short_wait++;
    $display("config (%0.1f, %0.1f, %0.1f, %0.1f) deg, wait %0d: run took %0d clocks",
             t1d, t2d, t3d, t4d, rom_wait, cyc);
  endtask

  initial begin
    automatic real lo [4] = '{-45.0, -15.0, 6.5, 0.0};
    automatic real hi [4] = '{135.0, 60.0, 90.0, 90.0};
    fix16_t v;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(ready && !data_get_valid, "ready after reset");

    // hard-wired registers ignore writes
    set_reg(0, 16'sh5555);
    set_reg(1, 16'sh5555);
    get_reg(0, v); check(v == 16'sh0000, "r0 is not 0.0"); if (v == 0) n_hardwired++;
    get_reg(1, v); check(v == 16'sh0100, "r1 is not 1.0"); if (v == 16'sh0100) n_hardwired++;

    // unused command code is ignored
    wait_ready();
    cmd = '{CMD_NOP, 5'd7}; strobe = 1'b1;
    repeat (5) begin @(negedge clk); check(ready, "command 11 not ignored"); end
    strobe = 1'b0;
    n_nop++;

    foreach (kc[i]) begin
      kc[i] = from_real(kr[i]);
      set_reg(raddr_t'(2 + i), kc[i]);
    end

    for (int c = 0; c < 16; c++)
      one_config(c[0] ? hi[0] : lo[0], c[1] ? hi[1] : lo[1],
                 c[2] ? hi[2] : lo[2], c[3] ? hi[3] : lo[3], 1'b1);
    rom_wait = 3'd7;
    one_config(30.0, 20.0, 45.0, 10.0, 1'b1);
    rom_wait = 3'd3;
    for (int k = 0; k < 8; k++) begin
      real t [4];
      foreach (t[i]) t[i] = lo[i] + (hi[i] - lo[i]) * real'($urandom % 1001) / 1000.0;
      one_config(t[0], t[1], t[2], t[3], 1'b1);
    end
    rom_wait = 3'd1;
    one_config(70.0, 35.0, 50.0, 40.0, 1'b0);
    rom_wait = 3'd3;

    // reset in the middle of a run: back to ready, registers cleared, and
    // the processor works again once the constants are reloaded
    wait_ready();
    cmd = '{CMD_RUN, 5'd0}; strobe = 1'b1;
    repeat (1500) @(negedge clk);
    check(!ready && dut.u_control.state == dut.u_control.C_EX_GO, "run not in progress");
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    strobe = 1'b0;
    @(negedge clk);
    check(ready && !data_get_valid, "not ready after reset during run");
    if (ready) n_mid_reset++;
    for (int r = 2; r < NREGS; r++) begin
      get_reg(raddr_t'(r), v);
      check(v == 16'sh0000, $sformatf("r%0d = %h after reset during run", r, v));
    end
    foreach (kc[i]) set_reg(raddr_t'(2 + i), kc[i]);
    one_config(100.0, 45.0, 30.0, 60.0, 1'b1);

    $display("mechanisms: set %0d get %0d run %0d reuse %0d ack_delay %0d hardwired %0d nop %0d",
             n_set, n_get, n_run, n_reuse, n_ack_delay, n_hardwired, n_nop);
    $display("            sub %0d neg_mult %0d wait3 %0d wait7 %0d short_wait %0d mid_run_reset %0d",
             n_sub, n_neg_mult, n_wait3, n_wait7, n_short_wait, n_mid_reset);
    check(n_set > 0,  "no set");        check(n_get > 0, "no get");
    check(n_run > 0,  "no run");        check(n_reuse > 0, "no run reusing constants");
    check(n_ack_delay > 0, "no delayed ack");
    check(n_hardwired == 2, "hard-wired registers not exercised");
    check(n_nop > 0, "no ignored command");
    check(n_sub > 0, "no subtraction");  check(n_neg_mult > 0, "no negative multiply");
    check(n_wait3 > 0 && n_wait7 > 0 && n_short_wait > 0, "wait-state settings not all used");
    check(n_mid_reset > 0, "no reset during a run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
