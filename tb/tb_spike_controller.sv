// tb_spike_controller: walks the state machine through detection, window,
// sorting, output back-pressure and cool-down, with the timer, sort engine
// and output handshake modelled in the testbench, and checks every strobe in
// every cycle against the expected sequence.
module tb_spike_controller;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] level, threshold;
  logic win_done, sort_done, aer_ready;
  logic feat_clear, feat_en, win_start, sort_start, aer_load, spike_active, cooling;
  int checks = 0, failures = 0;

  spike_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, checked just before the next clock edge
  task automatic expect_out(string what, logic clr, logic en, logic ws, logic ss, logic ld, logic act, logic cool);
    checks++;
    if ({feat_clear, feat_en, win_start, sort_start, aer_load, spike_active, cooling} !==
        {clr, en, ws, ss, ld, act, cool}) begin
      failures++;
      $display("%s: got %b%b%b%b%b%b%b want %b%b%b%b%b%b%b", what,
               feat_clear, feat_en, win_start, sort_start, aer_load, spike_active, cooling,
               clr, en, ws, ss, ld, act, cool);
    end
  endtask

  task automatic cyc(); @(negedge clk); #1; endtask

  initial begin
    int wlen, blocked, coolcyc;
    level = 0; threshold = 20; win_done = 0; sort_done = 0; aer_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      level = -100;
      threshold = 8'($urandom_range(10, 60));
      wlen = $urandom_range(1, 8);
      blocked = $urandom_range(0, 3);
      coolcyc = $urandom_range(0, 3);
      cyc();
      // idle: level at or below threshold does nothing
      level = threshold; win_done = 0; sort_done = 0; aer_ready = 1;
      #1 expect_out("idle", 0, 0, 0, 0, 0, 0, 0);
      cyc();
      // detection
      level = threshold + 1;
      #1 expect_out("detect", 1, 0, 1, 0, 0, 0, 0);
      cyc();
      for (int t = 0; t < wlen; t++) begin
        #1 expect_out("spike", 0, 1, 0, 0, 0, 1, 0);
        cyc();
      end
      win_done = 1;
      #1 expect_out("window end", 0, 1, 0, 1, 0, 1, 0);
      cyc();
      win_done = 0;
      repeat (3) begin #1 expect_out("sorting", 0, 0, 0, 0, 0, 0, 0); cyc(); end
      sort_done = 1; aer_ready = (blocked == 0);
      #1 expect_out("sort done", 0, 0, 0, 0, 0, 0, 0);
      cyc();
      sort_done = 0;
      for (int t = 0; t < blocked; t++) begin
        #1 expect_out("emit blocked", 0, 0, 0, 0, 0, 0, 0);
        cyc();
      end
      aer_ready = 1;
      #1 expect_out("emit", 0, 0, 0, 0, 1, 0, 0);
      cyc();
      // cool-down while the level stays above threshold
      level = threshold + 5;
      for (int t = 0; t < coolcyc; t++) begin
        #1 expect_out("cooldown", 0, 0, 0, 0, 0, 0, 1);
        cyc();
      end
      level = threshold - 3;
      #1 expect_out("cooldown exit", 0, 0, 0, 0, 0, 0, 1);
      cyc();
      #1 expect_out("idle again", 0, 0, 0, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
