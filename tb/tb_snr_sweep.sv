// tb_snr_sweep: sorting accuracy of one channel at three noise levels.
//
// Four synthetic spike classes (same shapes as the end-to-end test) are
// played through a behavioural model of the analog ADC with band-limited
// noise of increasing amplitude ("high", "medium" and "low" SNR: standard
// deviations of about 1.1, 4.4 and 8.7 LSB against spike peaks of 40 to
// 110 LSB). For each
// level the channel is trained like a real deployment: eight labelled noisy
// spikes per class are played, their features read back, and the mean of
// each feature written into that class's template. Then 40 unlabelled spikes
// are sorted. Accuracy is 1 - Ne/Nsu, where Ne counts missed spikes, extra
// (false) detections and wrong classes, and Nsu the spikes played.
// The high-SNR accuracy must reach 90 %; the others are reported.
module tb_snr_sweep;
  import ct_sort_pkg::*;

  localparam int NC = 4;
  localparam int AW = cfg_aw(NC);
  localparam real PI = 3.141592653589793;
  localparam int SLOT = 3500;
  localparam int N_TRAIN = 8;
  localparam int N_TEST = 40;

  logic clk = 0, rst_n = 0;
  logic [3:0] comp_up, comp_dn, dac1_code;
  logic [7:0] dac2_code;
  logic cfg_we = 0;
  logic [AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  logic spike_active, aer_req, aer_ack;
  step_evt_t evt;
  logic [5:0] aer_addr;
  int vin = 0;
  int checks = 0, failures = 0;
  int rx_q [$];
  logic signed [7:0] last_feat [4];

  ct_spike_sorter dut (.*);

  ct_adc_model u_adc (
    .clk, .rst_n, .vin, .dac2_code(dac2_code), .evt_valid(evt.valid),
    .dac1_code, .comp_up, .comp_dn
  );

  always #500ns clk = ~clk;

  initial begin
    #5s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // address-event receiver, always ready
  initial begin
    aer_ack = 0;
    forever begin
      @(posedge clk);
      if (aer_req && !aer_ack) begin
        rx_q.push_back(int'(aer_addr) & 3);
        aer_ack <= 1;
        @(posedge clk);
        while (aer_req) @(posedge clk);
        aer_ack <= 0;
      end
    end
  end

  // features of the latest window, sampled when sorting starts
  always @(posedge clk)
    if (dut.u_ctl.sort_start) begin
      for (int k = 0; k < 3; k++) last_feat[k] = dut.cnt[k];
      last_feat[3] = dut.peak;
    end

  function automatic real shape(int c, int t);
    real a, b; int t1, t2;
    case (c)
      0: begin a = 60;  t1 = 300; b = 30; t2 = 600; end
      1: begin a = 90;  t1 = 700; b = 50; t2 = 500; end
      2: begin a = 40;  t1 = 150; b = 60; t2 = 250; end
      default: begin a = 110; t1 = 250; b = 20; t2 = 900; end
    endcase
    if (t < 0) return 0.0;
    if (t < t1) return a * $sin(PI * t / t1);
    if (t < t1 + t2) return -b * $sin(PI * (t - t1) / t2);
    return 0.0;
  endfunction

  task automatic cfg_write(int addr, int data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = AW'(addr); cfg_wdata = CFG_DW'(data);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // one spike slot; noise: white uniform noise of +/- amp/16 LSB through a
  // first-order low-pass with a time constant of 4 cycles
  real lp = 0.0;
  task automatic play(int c, int amp);
    real w;
    for (int t = 0; t < SLOT; t++) begin
      @(negedge clk);
      w = (amp > 0) ? real'(int'($urandom_range(2 * amp)) - amp) : 0.0;
      lp = lp + (w - lp) / 4.0;
      vin = $rtoi(16.0 * shape(c, t - 100) + lp);
    end
  endtask

  initial begin
    static int amps [3] = '{80, 320, 640};
    static string names [3] = '{"high", "medium", "low"};
    int sum [NC][4];
    int cr, ne, got, n_rx, acc10;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg_write(CFG_THRESH, 15);
    cfg_write(CFG_MUXSEL, int'({3'b0_11, 3'b1_01, 3'b0_01}));
    cfg_write(CFG_DAC1, 5);
    for (int s = 0; s < 3; s++) begin
      // training on labelled noisy spikes
      foreach (sum[i, j]) sum[i][j] = 0;
      for (int c = 0; c < NC; c++)
        for (int i = 0; i < N_TRAIN; i++) begin
          play(c, amps[s]);
          for (int k = 0; k < 3; k++) sum[c][k] += int'($unsigned(last_feat[k]));
          sum[c][3] += int'(last_feat[3]);
        end
      repeat (100) @(negedge clk);
      rx_q.delete();
      for (int c = 0; c < NC; c++)
        for (int k = 0; k < 4; k++)
          cfg_write(CFG_TPL_BASE + 4 * c + k,
                    int'({3'(k == 3 ? 1 : 0), 8'(sum[c][k] / N_TRAIN)}));
      // sorting
      ne = 0;
      for (int i = 0; i < N_TEST; i++) begin
        cr = $urandom_range(NC - 1);
        play(cr, amps[s]);
        n_rx = rx_q.size();
        if (n_rx == 0) ne++;                       // missed
        else begin
          got = rx_q.pop_front();
          if (got != cr) ne++;                     // wrong class
          ne += n_rx - 1;                          // false detections
        end
        rx_q.delete();
      end
      acc10 = 1000 * (N_TEST - ne) / N_TEST;
      $display("%s SNR (noise +/-%0d/16 LSB): accuracy %0d.%0d %%, errors %0d of %0d",
               names[s], amps[s], acc10 / 10, acc10 % 10, ne, N_TEST);
      checks++;
      if (s == 0 && acc10 < 900) begin failures++; $display("high-SNR accuracy below 90 %%"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
