// tb_sadc_top: end-to-end test of the variable-gain stochastic flash ADC at
// its default size (1024 comparators, 3 banks, no parameter overrides).
//
// One sample is applied per clock, on the falling edge. For each sample the
// testbench computes the expected output code itself: the number of
// comparators in the enabled banks whose offset lies below inp - inn (the
// offsets are regenerated from the same process model, bank membership from
// the cumulative bank sizes N/4, N/2, N). dout must show that code exactly
// LATENCY cycles after the sample, which checks the comparator bank, the
// gain control, the Wallace tree and the pipeline alignment together.
//
// Besides random samples the stimulus makes every mechanism happen and
// counts it: each gain setting (0 to 3 banks), gain changes from one sample to the next, full scale (every enabled
// comparator high) and zero output. Statistical checks hold the transfer
// curve against a Gaussian CDF of sigma = SIGMA_CODES: with all banks on,
// inputs of -sigma, 0 and +sigma must give about 16%, 50% and 84% of 1024,
// and the count for one bank must be about a quarter of that for three.
module tb_sadc_top;
  import sadc_pkg::*;

  localparam int N       = 1024;
  localparam int NB      = 3;
  localparam int SEED    = 1;
  localparam int GW      = $clog2(NB + 1);
  localparam int OW      = wt_cols(N);
  localparam int LAT     = wt_stages(N) + 1;
  localparam int SIG     = SIGMA_CODES;
  localparam int SAMPLES = 3000;

  logic          clk = 1'b0;
  logic          rst_n;
  vin_t          inp, inn;
  logic [GW-1:0] gain;
  logic [NB-1:0] bank_en;
  logic [OW-1:0] dout;

  int off [N];
  int exp_code [SAMPLES];
  int got_code [SAMPLES];
  int s_vin    [SAMPLES];
  int s_gain   [SAMPLES];

  int checks   = 0;
  int failures = 0;
  int n_gain [8];
  int n_switch = 0;
  int n_full   = 0;
  int n_zero   = 0;

  sadc_top dut (
    .clk(clk), .rst_n(rst_n), .inp(inp), .inn(inn), .gain(gain),
    .bank_en(bank_en), .dout(dout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (SAMPLES + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int active_of(int g);
    int nb;
    nb = (g > NB) ? NB : g;
    return (nb == 0) ? 0 : (N >> (NB - nb));
  endfunction

  // Expected code: comparators 0 .. active-1 belong to the enabled banks.
  function automatic int model(int vin, int g);
    int cnt;
    cnt = 0;
    for (int i = 0; i < active_of(g); i++)
      if (vin > off[i]) cnt++;
    return cnt;
  endfunction

  // Stimulus of sample k: input code and gain code.
  task automatic stimulus(int k, output int vin, output int g);
    if (k < 200) begin
      // Directed part: statistics points, then full scale and zero.
      case (k % 10)
        0: begin vin = -SIG;    g = 3; end
        1: begin vin = 0;       g = 3; end
        2: begin vin = SIG;     g = 3; end
        3: begin vin = SIG / 2; g = 1; end
        4: begin vin = SIG / 2; g = 3; end
        5: begin vin = 8 * SIG; g = 3; end
        6: begin vin = -8 * SIG; g = 2; end
        7: begin vin = 8 * SIG; g = 1; end
        8: begin vin = 0;       g = 0; end
        default: begin vin = SIG; g = 2; end
      endcase
    end else begin
      vin = int'($urandom_range(0, 5 * SIG)) - (5 * SIG) / 2;
      g   = ($urandom_range(0, 9) < 7) ? s_gain[k-1] : int'($urandom_range(0, (1 << GW) - 1));
    end
  endtask

  int k_drv = 0;
  int k_chk = 0;

  initial begin
    for (int i = 0; i < N; i++) off[i] = comp_offset(i, SEED, SIG);
    rst_n = 1'b0;
    inp   = '0;
    inn   = '0;
    gain  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end

  // Drive sample k on the falling edge; it is decided at the next rising edge.
  always @(negedge clk) begin
    if (rst_n && k_drv < SAMPLES) begin
      int vin, g, half;
      stimulus(k_drv, vin, g);
      s_vin[k_drv]    = vin;
      s_gain[k_drv]   = g;
      exp_code[k_drv] = model(vin, g);
      // Split the differential input between both pins, as a pair would.
      half = vin / 2;
      inp  = vin_t'(half);
      inn  = vin_t'(half - vin);
      gain = GW'(g);
      k_drv++;
    end
  end

  // Sample k is decided at rising edge k and shown at rising edge k + LAT.
  int rise = -1;
  always @(posedge clk) begin
    if (k_drv > 0) begin
      rise++;
      if (rise >= LAT && k_chk < SAMPLES) begin
        int k;
        k = rise - LAT;
        got_code[k] = int'(dout);
        checks++;
        if (got_code[k] != exp_code[k]) begin
          failures++;
          if (failures < 10)
            $display("FAIL sample %0d vin=%0d gain=%0d: dout=%0d expected %0d",
                     k, s_vin[k], s_gain[k], got_code[k], exp_code[k]);
        end
        n_gain[s_gain[k]]++;
        if (k > 0 && s_gain[k] != s_gain[k-1]) n_switch++;
        if (active_of(s_gain[k]) > 0 && got_code[k] == active_of(s_gain[k])) n_full++;
        if (got_code[k] == 0) n_zero++;
        k_chk++;
        if (k_chk == SAMPLES) finish_up();
      end
    end
  end

  task automatic expect_near(string what, real got, real want, real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s: %0.1f, expected %0.1f +- %0.1f", what, got, want, tol);
    end else begin
      $display("%s: %0.1f (expected about %0.1f)", what, got, want);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("%-28s happened %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  task automatic finish_up();
    // Gaussian CDF at -1, 0, +1 sigma: 0.1587, 0.5, 0.8413 of 1024.
    expect_near("code at -sigma", real'(got_code[0]), 162.5, 45.0);
    expect_near("code at 0",      real'(got_code[1]), 512.0, 60.0);
    expect_near("code at +sigma", real'(got_code[2]), 861.5, 45.0);
    expect_near("gain 3 / gain 1 at sigma/2", real'(got_code[4]) / real'(got_code[3]), 4.0, 1.0);
    for (int g = 0; g <= NB; g++) expect_seen($sformatf("gain setting %0d", g), n_gain[g]);
    expect_seen("gain switch", n_switch);
    expect_seen("full scale", n_full);
    expect_seen("zero code", n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
