// tb_sadc_comparator: checks the comparator model's decision and timing.
// With an offset of 123 codes, random and boundary differential inputs are
// applied; after each rising edge q must equal (inp - inn > 123). Inputs are
// also changed between rising edges to check that q holds its decision until
// the next rising edge.
module tb_sadc_comparator;
  import sadc_pkg::*;

  localparam int OFF = 123;

  logic clk = 1'b0;
  vin_t inn, inp;
  logic q;
  int   checks   = 0;
  int   failures = 0;

  sadc_comparator #(.OFFSET(OFF)) dut (.clk(clk), .inn(inn), .inp(inp), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int p, int n);
    logic exp_q;
    @(negedge clk);
    inp = vin_t'(p);
    inn = vin_t'(n);
    exp_q = (p - n) > OFF;
    @(posedge clk);
    #1;
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL inp=%0d inn=%0d q=%0d expected %0d", p, n, q, exp_q);
    end
    // Flip the input before the next rising edge: q must hold.
    inp = vin_t'(n);
    inn = vin_t'(p);
    #2;
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL q changed between rising edges");
    end
  endtask

  initial begin
    inp = '0;
    inn = '0;
    apply(OFF, 0);          // equal to offset: low
    apply(OFF + 1, 0);      // just above: high
    apply(0, -OFF);         // equal via inn
    apply(1, -OFF);
    apply(32767, -32768);   // extremes
    apply(-32768, 32767);
    for (int k = 0; k < 400; k++) begin
      int p, n;
      p = int'($urandom_range(0, 4000)) - 2000;
      n = int'($urandom_range(0, 4000)) - 2000;
      apply(p, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
