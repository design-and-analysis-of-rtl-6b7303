// tb_sadc_bank_ctrl: checks the reset state (all banks on) and, for every
// gain code including those above N_BANKS, the thermometer enables that
// appear after one rising edge: bank b is on exactly when b < min(gain,
// N_BANKS).
module tb_sadc_bank_ctrl;
  localparam int NB = 3;
  localparam int GW = $clog2(NB + 1);

  logic          clk = 1'b0;
  logic          rst_n;
  logic [GW-1:0] gain;
  logic [NB-1:0] bank_en;
  int            checks   = 0;
  int            failures = 0;

  sadc_bank_ctrl #(.N_BANKS(NB)) dut (.clk(clk), .rst_n(rst_n), .gain(gain), .bank_en(bank_en));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] expect_en(int g);
    logic [NB-1:0] e;
    int n;
    n = (g > NB) ? NB : g;
    e = '0;
    for (int b = 0; b < n; b++) e[b] = 1'b1;
    return e;
  endfunction

  initial begin
    gain  = '0;
    rst_n = 1'b0;
    #12;
    checks++;
    if (bank_en !== '1) begin
      failures++;
      $display("FAIL reset state %b", bank_en);
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      int g;
      g = (k < (1 << GW)) ? k : int'($urandom_range(0, (1 << GW) - 1));
      @(negedge clk);
      gain = GW'(g);
      @(posedge clk);
      #1;
      checks++;
      if (bank_en !== expect_en(g)) begin
        failures++;
        $display("FAIL gain=%0d bank_en=%b expected %b", g, bank_en, expect_en(g));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
