// tb_aer_tx: a receiver with random acknowledge delays takes random class
// results; checks the address {CHANNEL_ID, class}, the four-phase order
// (req rises only while ack is low, falls only after ack), that ready is low
// while a transfer is in progress and that a load while busy is ignored.
module tb_aer_tx;
  logic clk = 0, rst_n = 0, load, ready, req, ack;
  logic [1:0] cls;
  logic [5:0] addr;
  int checks = 0, failures = 0, n_ignored = 0;

  aer_tx #(.CH_W(4), .CLS_W(2), .CHANNEL_ID(9)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: acknowledges after a random delay, releases after req falls
  initial begin
    ack = 0;
    forever begin
      @(posedge clk);
      if (req && !ack) begin
        repeat ($urandom_range(5)) @(posedge clk);
        ack <= 1;
        @(posedge clk);
        while (req) @(posedge clk);
        repeat ($urandom_range(3)) @(posedge clk);
        ack <= 0;
      end
    end
  end

  initial begin
    logic [1:0] sent;
    load = 0; cls = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      sent = 2'($urandom);
      cls = sent; load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (!req || ready || addr !== {4'd9, sent}) begin
        failures++; $display("after load req=%b ready=%b addr=%h", req, ready, addr);
      end
      // a second load while busy must be ignored
      cls = ~sent; load = 1;
      @(negedge clk);
      load = 0;
      n_ignored++;
      while (!ack) begin
        checks++;
        if (!req || addr !== {4'd9, sent}) begin failures++; $display("req dropped early"); end
        @(negedge clk);
      end
      while (req) @(negedge clk);
      checks++;
      if (ack !== 1'b1 && ready) begin failures++; $display("ready before ack fell"); end
      while (ack) begin
        checks++;
        if (ready || req) begin failures++; $display("ready/req while ack high"); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
