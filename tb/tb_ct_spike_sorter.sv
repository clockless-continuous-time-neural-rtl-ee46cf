// tb_ct_spike_sorter: end-to-end test of one channel at its default size
// (2000-cycle spike window, 4 classes).
//
// Four synthetic spike shapes (a positive half-sine followed by a negative
// one, with class-specific heights and durations) drive a behavioural model
// of the analog ADC. The test
//   1. uploads a configuration (threshold, +2/-2/+8 event streams, delay),
//   2. "trains" offline: plays each clean shape once and reads the four
//      resulting features back as that class's template,
//   3. replays the clean shapes in random order, where the class reported
//      on the address-event output must be the right one every time,
//   4. plays noisy shapes and requires at least 90 % accuracy,
//   5. switches the event selection to +1/-1 and feeds a fast oscillation,
//      which saturates a step counter and holds the level above threshold
//      past the window end (cool-down),
//   6. plays an over-range spike, which saturates the level register.
// The address-event receiver sometimes stalls long enough that the next
// result waits for the sender (output back-pressure). Each mechanism is
// counted and must occur at least once.
module tb_ct_spike_sorter;
  import ct_sort_pkg::*;

  localparam int NC = 4;
  localparam int AW = cfg_aw(NC);
  localparam real PI = 3.141592653589793;

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
  // mechanism counters
  int n_detect = 0, n_cooldown_wait = 0, n_cnt_sat = 0, n_lvl_sat = 0;
  int n_aer_stall = 0, n_mode_switch = 0, n_step [2][4];
  int stall_ack = 0;   // when set, the receiver holds the next ack for long
  int rx_q [$];

  ct_spike_sorter dut (.*);

  ct_adc_model u_adc (
    .clk, .rst_n, .vin, .dac2_code(dac2_code), .evt_valid(evt.valid),
    .dac1_code, .comp_up, .comp_dn
  );

  always #500ns clk = ~clk;  // 1 MHz event-sampling clock

  initial begin
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // address-event receiver
  initial begin
    aer_ack = 0;
    forever begin
      @(posedge clk);
      if (aer_req && !aer_ack) begin
        rx_q.push_back(int'(aer_addr));
        checks++;
        if (aer_addr[5:2] != 4'd0) begin failures++; $display("bad channel id %h", aer_addr); end
        if (stall_ack != 0) begin repeat (stall_ack) @(posedge clk); stall_ack = 0; end
        else repeat ($urandom_range(1, 8)) @(posedge clk);
        aer_ack <= 1;
        @(posedge clk);
        while (aer_req) @(posedge clk);
        aer_ack <= 0;
      end
    end
  end

  // latency from window end to the address-event request: N_CLASSES + 3
  // cycles when the output is free
  int cyc = 0, t_wd = 0, n_lat = 0;
  logic req_q = 0, stalled = 0;
  always @(posedge clk) begin
    cyc++;
    req_q <= aer_req;
    if (dut.win_done) begin t_wd = cyc; stalled = 0; end
    if (dut.u_ctl.state == dut.u_ctl.EMIT && !dut.aer_ready) stalled = 1;
    if (aer_req && !req_q && !stalled) begin
      n_lat++;
      checks++;
      if (cyc - t_wd != NC + 3) begin
        failures++;
        $display("window end to request: %0d cycles, want %0d", cyc - t_wd, NC + 3);
      end
    end
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (evt.valid) n_step[evt.dn][evt.step]++;
    if (dut.u_ctl.win_start) n_detect++;
    if (dut.u_ctl.cooling && dut.level > dut.threshold) n_cooldown_wait++;
    if (dut.u_regs.en && |(dut.u_regs.inc & dut.u_regs.sat)) n_cnt_sat++;
    if (dut.u_ctl.state == dut.u_ctl.EMIT && !dut.aer_ready) n_aer_stall++;
    if (evt.valid && (dut.level == 127 || dut.level == -128)) n_lvl_sat++;
  end

  // class c spike: (peak height, rise, trough depth, fall) in LSB and cycles
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

  // play one spike slot of SLOT cycles; noise is uniform, +/- noise/16 LSB
  localparam int SLOT = 3500;
  task automatic play(int c, int noise);
    for (int t = 0; t < SLOT; t++) begin
      @(negedge clk);
      vin = $rtoi(16.0 * shape(c, t - 100));
      if (noise > 0) vin += $urandom_range(2 * noise) - noise;
    end
    vin = 0;
  endtask

  // wait for the next reported class (or time out)
  task automatic get_class(output int cls);
    int w = 0;
    while (rx_q.size() == 0 && w < 20000) begin @(negedge clk); w++; end
    if (rx_q.size() == 0) cls = -1;
    else cls = rx_q.pop_front() & 3;
  endtask

  initial begin
    logic [7:0] tf [NC][4];
    int cls, ok, nn, cr;
    int order [$];
    foreach (n_step[i, j]) n_step[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. configuration: threshold 15 LSB, counters on +2, -2, +8, delay 5
    cfg_write(CFG_THRESH, 15);
    cfg_write(CFG_MUXSEL, int'({3'b0_11, 3'b1_01, 3'b0_01}));
    cfg_write(CFG_DAC1, 5);
    checks++;
    if (dac1_code != 4'd5) begin failures++; $display("dac1 code %0d", dac1_code); end

    // 2. training: features of each clean class become its template
    for (int c = 0; c < NC; c++) begin
      fork
        play(c, 0);
        begin
          @(posedge dut.u_ctl.sort_start);
          for (int k = 0; k < 3; k++) tf[c][k] = dut.cnt[k];
          tf[c][3] = dut.peak;
        end
      join
      get_class(cls);
      $display("class %0d features: %0d %0d %0d peak %0d", c, tf[c][0], tf[c][1], tf[c][2], $signed(tf[c][3]));
    end
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < 4; k++)
        cfg_write(CFG_TPL_BASE + 4 * c + k, int'({3'(k == 3 ? 1 : 0), tf[c][k]}));

    // 3. clean replay, random order, with one long receiver stall
    for (int i = 0; i < 12; i++) order.push_back(i % NC);
    order.shuffle();
    foreach (order[i]) begin
      if (i == 3) stall_ack = 4000;
      play(order[i], 0);
      get_class(cls);
      checks++;
      if (cls != order[i]) begin failures++; $display("clean spike %0d: class %0d, want %0d", i, cls, order[i]); end
    end

    // 4. noisy spikes
    ok = 0; nn = 40;
    for (int i = 0; i < nn; i++) begin
      cr = $urandom_range(NC - 1);
      play(cr, 6);
      get_class(cls);
      if (cls == cr) ok++;
    end
    $display("noisy accuracy %0d of %0d", ok, nn);
    checks++;
    if (ok * 10 < nn * 9) begin failures++; $display("accuracy below 90 %%"); end

    // 5. mode switch: count +1/-1 events, fast oscillation above threshold
    cfg_write(CFG_MUXSEL, int'({3'b0_01, 3'b1_00, 3'b0_00}));
    cfg_write(CFG_DAC1, 0);
    n_mode_switch++;
    for (int t = 0; t < 2600; t++) begin
      @(negedge clk);
      vin = 16 * 30 + ((t % 2 == 1) ? 20 : -20);
    end
    get_class(cls);
    checks++;
    if (cls < 0) begin failures++; $display("no result after oscillation"); end
    checks++;
    if (dut.u_regs.sat == '0) begin failures++; $display("no counter saturated: %p", dut.cnt); end
    vin = 0;
    repeat (200) @(negedge clk);

    // 6. over-range spike saturates the level register
    cfg_write(CFG_DAC1, 5);
    for (int t = 0; t < SLOT; t++) begin
      @(negedge clk);
      vin = $rtoi(16.0 * 2.0 * shape(3, t - 100));
    end
    vin = 0;
    get_class(cls);
    repeat (200) @(negedge clk);

    // mechanisms
    $display("detections %0d, cool-down waits %0d, counter saturations %0d, level saturations %0d, output stalls %0d, mode switches %0d",
             n_detect, n_cooldown_wait, n_cnt_sat, n_lvl_sat, n_aer_stall, n_mode_switch);
    $display("step events +1..+8: %0d %0d %0d %0d  -1..-8: %0d %0d %0d %0d",
             n_step[0][0], n_step[0][1], n_step[0][2], n_step[0][3],
             n_step[1][0], n_step[1][1], n_step[1][2], n_step[1][3]);
    foreach (n_step[i, j]) begin
      checks++;
      if (n_step[i][j] == 0) begin failures++; $display("step %0d/%0d never happened", i, j); end
    end
    checks += 5;
    if (n_detect == 0)        begin failures++; $display("no detection"); end
    if (n_cooldown_wait == 0) begin failures++; $display("no cool-down wait"); end
    if (n_cnt_sat == 0)       begin failures++; $display("no counter saturation"); end
    if (n_lvl_sat == 0)       begin failures++; $display("no level saturation"); end
    if (n_aer_stall == 0)     begin failures++; $display("no output stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
