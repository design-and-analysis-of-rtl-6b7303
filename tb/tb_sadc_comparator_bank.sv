// tb_sadc_comparator_bank: checks a 64-comparator, 3-bank array bit by bit.
// The expected vector is built in the testbench: comparator i is high when
// its bank is enabled and inp - inn exceeds its offset. Bank membership is
// worked out here from the cumulative sizes N/4, N/2, N. Random inputs and
// random enable patterns are applied on the falling edge and checked after
// the rising edge.
module tb_sadc_comparator_bank;
  import sadc_pkg::*;

  localparam int N    = 64;
  localparam int NB   = 3;
  localparam int SEED = 7;

  logic          clk = 1'b0;
  vin_t          inn, inp;
  logic [NB-1:0] bank_en;
  logic [N-1:0]  q;
  int            off [N];
  int            checks   = 0;
  int            failures = 0;
  int            seen_on  = 0;

  sadc_comparator_bank #(.N_COMP(N), .N_BANKS(NB), .SEED(SEED), .SIGMA(SIGMA_CODES)) dut (
    .clk(clk), .inn(inn), .inp(inp), .bank_en(bank_en), .q(q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bank_idx(int i);
    if (i < N / 4) return 0;
    if (i < N / 2) return 1;
    return 2;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) off[i] = comp_offset(i, SEED, SIGMA_CODES);
    inp = '0;
    inn = '0;
    bank_en = '1;
    for (int k = 0; k < 2000; k++) begin
      int p, n;
      logic [N-1:0] e;
      p = int'($urandom_range(0, 6 * SIGMA_CODES)) - 3 * SIGMA_CODES;
      n = int'($urandom_range(0, 2 * SIGMA_CODES)) - SIGMA_CODES;
      @(negedge clk);
      inp = vin_t'(p);
      inn = vin_t'(n);
      bank_en = NB'($urandom_range(0, (1 << NB) - 1));
      for (int i = 0; i < N; i++) e[i] = bank_en[bank_idx(i)] && ((p - n) > off[i]);
      @(posedge clk);
      #1;
      checks++;
      if (q !== e) begin
        failures++;
        if (failures < 10) $display("FAIL vin=%0d en=%b q=%h expected %h", p - n, bank_en, q, e);
      end
      seen_on += $countones(q);
    end
    // The offsets must actually spread: a random input must not leave all
    // comparators in the same state every time.
    checks++;
    if (seen_on == 0) begin
      failures++;
      $display("FAIL no comparator ever decided high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
