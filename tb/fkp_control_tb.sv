// fkp_control_tb: self-checking test of the control unit.
//
// The functional units are replaced by simple responders in this testbench:
// each answers its go after a random number of clocks (adder and multiplier
// hold done until go falls, the cosine/sine unit gives a one-clock ready).
// The testbench checks the host protocol (ready after reset and between
// commands, ready held low until strobe falls, data_get_valid held until
// data_get_ack, command 11 ignored), the core control sequence of a set
// (input latch, then a register write of the addressed word with the mux on
// the data-in path) and of a get (output latch with the addressed word on the
// B port), and for a run: 29 register writes to the destinations of the
// program in order, each preceded by a go to the right unit that is held
// until the unit reports done, with the mux on that unit, and made only after
// that unit reported done.
module fkp_control_tb;
  import fkp_pkg::*;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  logic      strobe = 1'b0, data_get_ack = 1'b0;
  logic      ready, data_get_valid;
  cmd_port_t cmd = '0;
  logic      data_in_latch, data_out_latch, c_reg_latch;
  raddr_t    c_reg_addr, a_reg_addr, b_reg_addr;
  logic      cos_sin_ready = 1'b0, adder_done = 1'b0, mult_done = 1'b0;
  logic      cos_sin_go, cos_sin_sel, adder_go, adder_sel, mult_go;
  mux_sel_e  mux_sel;
  int checks = 0, failures = 0;

  // destinations of the 29 run steps, in order
  localparam int DEST [29] = '{26, 11, 12, 13, 14, 15, 16, 14, 22, 25, 20, 21, 23, 23, 24,
                                24, 27, 28, 17, 18, 17, 17, 18, 29, 30, 19, 31, 31, 31};

  always #5 clk = ~clk;

  fkp_control dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- unit responders ----------------
  int cnt_cs = 0, cnt_add = 0, cnt_mul = 0, delay_cs = 3, delay_add = 5, delay_mul = 9;
  always @(posedge clk) begin
    // cosine/sine: one-clock ready after a delay
    if (cos_sin_go && !cos_sin_ready) begin
      if (cnt_cs == delay_cs) begin cos_sin_ready <= 1'b1; cnt_cs <= 0; delay_cs <= 1 + $urandom % 10; end
      else cnt_cs <= cnt_cs + 1;
    end else begin
      cos_sin_ready <= 1'b0;
      if (!cos_sin_go) cnt_cs <= 0;
    end
    // adder: level done while go
    if (!adder_go) begin adder_done <= 1'b0; cnt_add <= 0; end
    else if (!adder_done) begin
      if (cnt_add == delay_add) begin adder_done <= 1'b1; delay_add <= 1 + $urandom % 20; end
      else cnt_add <= cnt_add + 1;
    end
    if (!mult_go) begin mult_done <= 1'b0; cnt_mul <= 0; end
    else if (!mult_done) begin
      if (cnt_mul == delay_mul) begin mult_done <= 1'b1; delay_mul <= 1 + $urandom % 40; end
      else cnt_mul <= cnt_mul + 1;
    end
  end

  // ---------------- monitor of the run ----------------
  int        n_writes = 0, n_go_early_drop = 0;
  bit        in_run = 0;
  mux_sel_e  last_unit;
  bit        unit_started, unit_done_seen;
  always @(posedge clk) if (!rst) begin
    if (cos_sin_go) begin last_unit = MUX_COS_SIN; unit_started = 1; end
    if (adder_go)   begin last_unit = MUX_ADDER;   unit_started = 1; end
    if (mult_go)    begin last_unit = MUX_MULT;    unit_started = 1; end
    if ((cos_sin_go && cos_sin_ready) || (adder_go && adder_done) || (mult_go && mult_done))
      unit_done_seen = 1;
    if (in_run && c_reg_latch) begin
      check(n_writes < 29, "more than 29 writes in a run");
      if (n_writes < 29)
        check(c_reg_addr == raddr_t'(DEST[n_writes]),
              $sformatf("run write %0d to r%0d exp r%0d", n_writes, c_reg_addr, DEST[n_writes]));
      check(unit_started && mux_sel == last_unit,
            $sformatf("run write %0d: mux %0d, unit started %0d", n_writes, mux_sel, last_unit));
      check(!cos_sin_go && !adder_go && !mult_go, "go still high during register write");
      check(unit_done_seen, $sformatf("run write %0d before the unit reported done", n_writes));
      unit_started = 0;
      unit_done_seen = 0;
      n_writes++;
    end
    // go dropped before the unit was done
    if ($fell(adder_go) && !$past(adder_done)) n_go_early_drop++;
    if ($fell(mult_go) && !$past(mult_done)) n_go_early_drop++;
    if ($fell(cos_sin_go) && !$past(cos_sin_ready)) n_go_early_drop++;
  end

  // ---------------- host tasks ----------------
  task automatic set_reg(input raddr_t r);
    int seen_in = 0, seen_wr = 0;
    @(negedge clk);
    check(ready, "not ready before set");
    cmd = '{CMD_SET, r}; strobe = 1'b1;
    repeat (8) begin
      @(negedge clk);
      if (data_in_latch) seen_in++;
      if (c_reg_latch) begin
        seen_wr++;
        check(seen_in == 1, "set: register write before input latch");
        check(c_reg_addr == r && mux_sel == MUX_DATA_IN, $sformatf("set: write r%0d mux %0d", c_reg_addr, mux_sel));
      end
      check(!ready, "ready high while strobe still high");
    end
    check(seen_in == 1 && seen_wr == 1, $sformatf("set: %0d latch %0d write pulses", seen_in, seen_wr));
    strobe = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(ready, "ready not back after set");
  endtask

  task automatic get_reg(input raddr_t r, input int ack_delay);
    int seen_out = 0, cyc = 0;
    @(negedge clk);
    cmd = '{CMD_GET, r}; strobe = 1'b1;
    while (!data_get_valid && cyc < 20) begin
      @(negedge clk); cyc++;
      if (data_out_latch) begin
        seen_out++;
        check(b_reg_addr == r, $sformatf("get: B address r%0d exp r%0d", b_reg_addr, r));
      end
    end
    check(seen_out == 1, "get: no output latch pulse before data_get_valid");
    repeat (ack_delay) begin
      @(negedge clk);
      check(data_get_valid, "data_get_valid dropped before ack");
    end
    data_get_ack = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check(!data_get_valid, "data_get_valid not released after ack");
    data_get_ack = 1'b0;
    strobe = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(ready, "ready not back after get");
  endtask

  task automatic run_prog();
    int cyc = 0;
    @(negedge clk);
    cmd = '{CMD_RUN, 5'd0}; strobe = 1'b1;
    in_run = 1; n_writes = 0;
    @(negedge clk);
    check(!ready, "ready still high in run");
    do begin @(negedge clk); cyc++; end while (n_writes < 29 && cyc < 50000);
    repeat (5) @(negedge clk);
    check(!ready, "ready before strobe released");
    check(n_writes == 29, $sformatf("run made %0d writes", n_writes));
    strobe = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(ready, "ready not back after run");
    in_run = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(ready, "ready during reset");
    rst = 1'b0;
    @(negedge clk);
    check(ready && !data_get_valid, "ready after reset");
    for (int i = 2; i <= 10; i++) set_reg(raddr_t'(i));
    run_prog();
    for (int i = 20; i <= 31; i++) get_reg(raddr_t'(i), i % 4);
    // unused command code: ignored
    @(negedge clk);
    cmd = '{CMD_NOP, 5'd3}; strobe = 1'b1;
    repeat (4) begin
      @(negedge clk);
      check(ready && !c_reg_latch && !data_out_latch && !cos_sin_go && !adder_go && !mult_go,
            "command 11 was not ignored");
    end
    strobe = 1'b0;
    run_prog();
    check(n_go_early_drop == 0, $sformatf("%0d go released before done", n_go_early_drop));
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
