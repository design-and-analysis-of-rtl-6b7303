// tb_sadc_sine_2048: the sine test of tb_sadc_sine run on the larger,
// 2048-comparator version of the converter (banks of 512, 512 and 1024;
// 12-bit code; latency 19). A coherent sine of about 20 MHz at 100 MS/s,
// amplitude one offset sigma and then a quarter of that, is applied at each
// gain setting. Every output code is compared with the count worked out in
// the testbench, and the SNDR of a known-frequency sine fit is reported.
// Checks: all codes exact; SNDR with all banks on between 20 and 40 dB (a
// uniform-threshold estimate, 10 log10(N/2), gives 30 dB for 2048
// comparators); the fundamental doubles per bank step; at a quarter of full
// scale, three banks give at least 3 dB more SNDR than one.
module tb_sadc_sine_2048;
  import sadc_pkg::*;

  localparam int  N      = 2048;
  localparam int  NB     = 3;
  localparam int  GW     = $clog2(NB + 1);
  localparam int  OW     = wt_cols(N);
  localparam int  LAT    = wt_stages(N) + 1;
  localparam int  NS     = 1024;
  localparam int  CYC    = 205;
  localparam real PI     = 3.14159265358979;

  logic          clk = 1'b0;
  logic          rst_n;
  vin_t          inp, inn;
  logic [GW-1:0] gain;
  logic [NB-1:0] bank_en;
  logic [OW-1:0] dout;

  int  off [N];
  int  checks   = 0;
  int  failures = 0;
  real amp_at  [4];
  real sndr_at [4];
  real sndr_small [4];

  sadc_top #(.N_COMP(N)) dut (
    .clk(clk), .rst_n(rst_n), .inp(inp), .inn(inn), .gain(gain),
    .bank_en(bank_en), .dout(dout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (7 * (NS + LAT + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int vin, int g);
    int cnt;
    cnt = 0;
    for (int i = 0; i < (N >> (NB - g)); i++)
      if (vin > off[i]) cnt++;
    return cnt;
  endfunction

  function automatic int vin_of(int k, int amp);
    return int'(real'(amp) * $sin(2.0 * PI * real'(CYC) * real'(k) / real'(NS)));
  endfunction

  task automatic run_gain(int g, int amp);
    int  code [NS];
    int  expc [NS];
    real si, co, dc, a, b, res, sig, ph;
    gain = GW'(g);
    // Drive NS + LAT samples; collect the codes that belong to samples 0..NS-1.
    for (int t = 0; t < NS + LAT; t++) begin
      int vin;
      @(negedge clk);
      vin = vin_of(t % NS, amp);
      inp = vin_t'(vin / 2);
      inn = vin_t'(vin / 2 - vin);
      if (t < NS) expc[t] = model(vin, g);
      @(posedge clk);
      #1;
      if (t >= LAT) code[t - LAT] = int'(dout);
    end
    for (int k = 0; k < NS; k++) begin
      checks++;
      if (code[k] != expc[k]) begin
        failures++;
        if (failures < 10) $display("FAIL gain %0d sample %0d: %0d expected %0d", g, k, code[k], expc[k]);
      end
    end
    si = 0.0; co = 0.0; dc = 0.0;
    for (int k = 0; k < NS; k++) begin
      ph = 2.0 * PI * real'(CYC) * real'(k) / real'(NS);
      si += real'(code[k]) * $sin(ph);
      co += real'(code[k]) * $cos(ph);
      dc += real'(code[k]);
    end
    a = 2.0 * si / NS;
    b = 2.0 * co / NS;
    dc = dc / NS;
    res = 0.0;
    for (int k = 0; k < NS; k++) begin
      real e;
      ph = 2.0 * PI * real'(CYC) * real'(k) / real'(NS);
      e = real'(code[k]) - (a * $sin(ph) + b * $cos(ph) + dc);
      res += e * e;
    end
    res = res / NS;
    sig = (a * a + b * b) / 2.0;
    if (amp == SIGMA_CODES) begin
      amp_at[g]  = $sqrt(a * a + b * b);
      sndr_at[g] = 10.0 * $log10(sig / res);
    end else begin
      sndr_small[g] = 10.0 * $log10(sig / res);
    end
    $display("input amplitude %0.3f sigma, gain %0d (%0d comparators): fundamental %0.1f codes, SNDR %0.2f dB",
             real'(amp) / SIGMA_CODES, g, N >> (NB - g), $sqrt(a * a + b * b), 10.0 * $log10(sig / res));
  endtask

  initial begin
    for (int i = 0; i < N; i++) off[i] = comp_offset(i, 1, SIGMA_CODES);
    rst_n = 1'b0;
    inp = '0;
    inn = '0;
    gain = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 1; g <= NB; g++) run_gain(g, SIGMA_CODES);
    for (int g = 1; g <= NB; g++) run_gain(g, SIGMA_CODES / 4);
    // A weak input gains SNDR from more active comparators (variable-gain use).
    checks++;
    if (sndr_small[3] < sndr_small[1] + 3.0) begin
      failures++;
      $display("FAIL SNDR at sigma/4: %0.2f dB with 3 banks, %0.2f dB with 1 bank", sndr_small[3], sndr_small[1]);
    end
    checks++;
    if (sndr_at[3] < 20.0 || sndr_at[3] > 40.0) begin
      failures++;
      $display("FAIL SNDR with all banks %0.2f dB outside 20..40 dB", sndr_at[3]);
    end
    for (int g = 2; g <= NB; g++) begin
      checks++;
      if (amp_at[g] / amp_at[g-1] < 1.7 || amp_at[g] / amp_at[g-1] > 2.3) begin
        failures++;
        $display("FAIL amplitude ratio gain %0d / %0d = %0.2f", g, g - 1, amp_at[g] / amp_at[g-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
