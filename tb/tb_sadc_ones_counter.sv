// tb_sadc_ones_counter: checks the Wallace-tree ones-counter at its default
// size (1024 inputs) and at two small sizes (7 and 100 inputs). A new random
// vector, with a density chosen at random so that all-zero, all-one and
// in-between vectors occur, is applied after every rising edge. The count
// seen LATENCY cycles later must equal $countones of that vector, which
// checks both the sum and the pipeline latency. The latency itself is also
// compared with the stage count worked out by hand for N = 1024 (16 adder
// stages plus the final adder).
module tb_sadc_ones_counter;
  localparam int NA = 1024;
  localparam int NB = 7;
  localparam int NC = 100;
  localparam int WA = $clog2(NA + 1);
  localparam int WB = $clog2(NB + 1);
  localparam int WC = $clog2(NC + 1);
  localparam int LA = sadc_pkg::wt_stages(NA) + 1;
  localparam int LB = sadc_pkg::wt_stages(NB) + 1;
  localparam int LC = sadc_pkg::wt_stages(NC) + 1;
  localparam int CYCLES = 3000;

  logic          clk = 1'b0;
  logic [NA-1:0] qa;
  logic [NB-1:0] qb;
  logic [NC-1:0] qc;
  logic [WA-1:0] ca;
  logic [WB-1:0] cb;
  logic [WC-1:0] cc;
  int            ha [CYCLES];
  int            hb [CYCLES];
  int            hc [CYCLES];
  int            checks   = 0;
  int            failures = 0;
  int            n_full   = 0;
  int            n_zero   = 0;

  sadc_ones_counter #(.N(NA)) dut_a (.clk(clk), .q(qa), .count(ca));
  sadc_ones_counter #(.N(NB)) dut_b (.clk(clk), .q(qb), .count(cb));
  sadc_ones_counter #(.N(NC)) dut_c (.clk(clk), .q(qc), .count(cc));

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic rnd_bit(int density);
    return $urandom_range(0, 99) < density;
  endfunction

  task automatic check(string tag, int got, int exp_v, int t);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d: count=%0d expected %0d", tag, t, got, exp_v);
    end
  endtask

  initial begin
    checks++;
    if (LA != 17) begin
      failures++;
      $display("FAIL latency for 1024 inputs is %0d, expected 17", LA);
    end
    qa = '0;
    qb = '0;
    qc = '0;
    for (int t = 0; t < CYCLES; t++) begin
      int dens;
      @(posedge clk);
      // Check the counts for the vectors applied LATENCY cycles ago.
      if (t >= LA) check("N=1024", int'(ca), ha[t - LA], t);
      if (t >= LB) check("N=7",    int'(cb), hb[t - LB], t);
      if (t >= LC) check("N=100",  int'(cc), hc[t - LC], t);
      case ($urandom_range(0, 9))
        0:       dens = 0;
        1:       dens = 100;
        default: dens = int'($urandom_range(0, 100));
      endcase
      for (int i = 0; i < NA; i++) qa[i] = rnd_bit(dens);
      for (int i = 0; i < NB; i++) qb[i] = rnd_bit(dens);
      for (int i = 0; i < NC; i++) qc[i] = rnd_bit(dens);
      ha[t] = $countones(qa);
      hb[t] = $countones(qb);
      hc[t] = $countones(qc);
      if (ha[t] == NA) n_full++;
      if (ha[t] == 0)  n_zero++;
    end
    checks++;
    if (n_full == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL full-scale or empty vector never applied");
    end
    $display("full-scale vectors %0d, empty vectors %0d", n_full, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
