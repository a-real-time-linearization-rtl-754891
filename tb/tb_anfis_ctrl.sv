// tb_anfis_ctrl -- checks the control unit: the ROM load walks addresses
// 0..18 once with the register write one clock behind the address, 'ready'
// rises only after the last write, a 'start' in S_IDLE runs the states in
// order, the divider is started exactly once, the unit waits in S_DIV for
// however long the divider takes, and 'done' follows S_OUT by one clock.
module tb_anfis_ctrl;
  import fp_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0, div_done = 0;
  anfis_state_t state;
  logic [4:0]   rom_addr, ld_addr;
  logic         ld_en, div_start, ready, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  anfis_ctrl dut (.clk, .rst_n, .start, .div_done, .state, .rom_addr, .ld_en,
                  .ld_addr, .div_start, .ready, .done);

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int writes, starts, cycles, expect_addr;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ROM load.
    writes = 0;
    expect_addr = 0;
    cycles = 0;
    while (!ready && cycles < 100) begin
      @(negedge clk);
      cycles++;
      if (ld_en) begin
        expect_true(ld_addr == 5'(writes), "load order");
        writes++;
      end
      if (state == S_LOAD) begin
        expect_true(rom_addr == 5'(expect_addr), "rom address");
        expect_addr++;
      end
    end
    expect_true(writes == int'(ROM_WORDS), "all words written once");
    expect_true(state == S_IDLE, "idle after load");
    // Three samples with different divider delays.
    for (int n = 0; n < 3; n++) begin
      automatic int wait_cycles = 5 + 10 * n;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      expect_true(state == S_SCALE, "scale");
      expect_true(!ready, "busy while working");
      @(negedge clk) expect_true(state == S_FUZZ, "fuzz");
      @(negedge clk) expect_true(state == S_WEIGHT, "weight");
      @(negedge clk) expect_true(state == S_SUM && div_start, "sum and divider start");
      starts = 0;
      for (int k = 0; k < wait_cycles; k++) begin
        @(negedge clk);
        if (div_start) starts++;
        expect_true(state == S_DIV, "waiting for divider");
      end
      expect_true(starts == 0, "single divider start");
      div_done = 1;
      @(negedge clk);
      div_done = 0;
      expect_true(state == S_OUT && !done, "out");
      @(negedge clk);
      expect_true(done && state == S_IDLE && ready, "done pulse and back to idle");
      @(negedge clk);
      expect_true(!done, "done is one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
