// sadc_top: variable-gain stochastic flash ADC core.
//
// A differential analog input (inp, inn, signed codes, see sadc_pkg) drives
// N_COMP comparators whose thresholds are nothing but their random offsets.
// On every rising clock edge each comparator decides; the pipelined
// Wallace-tree ones-counter adds the decisions on the falling edges that
// follow, and dout is the number of comparators that were high: a Gaussian
// CDF of the input. The gain setting chooses how many comparator banks take
// part (sadc_bank_ctrl), which scales the output code for the same input and
// replaces a variable-gain amplifier in front of the converter. In the
// stacked implementation the comparator bank sits on one die and the
// ones-counter on the other, one through-silicon via per comparator output;
// in RTL that partition is only the boundary between the two instances.
//
// Timing: one sample per clock. gain is registered at the same rising edge
// at which the comparators decide, and applies to that sample. dout for the
// sample decided at rising edge k appears after falling edge k + LATENCY - 1
// and is read at rising edge k + LATENCY (LATENCY = 17 for 1024
// comparators). rst_n (active low, asynchronous) resets only the gain
// register, to all banks on; the datapath has no reset and flushes itself
// within LATENCY cycles.
//
// Taken from the design: 1024 comparators, three bank enables, the
// pipelined full-adder tree counting on the falling clock edge. This
// implementation's own choices: the bank sizes, the gain encoding, the reset
// and the fixed-point scale of the input.
module sadc_top
  import sadc_pkg::*;
#(
  parameter  int unsigned N_COMP  = 1024,
  parameter  int unsigned N_BANKS = 3,
  parameter  int unsigned SEED    = 1,
  parameter  int          SIGMA   = SIGMA_CODES,
  localparam int unsigned GAIN_W  = $clog2(N_BANKS + 1),
  localparam int unsigned OUT_W   = wt_cols(N_COMP),
  localparam int unsigned LATENCY = wt_stages(N_COMP) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  vin_t               inp,
  input  vin_t               inn,
  input  logic [GAIN_W-1:0]  gain,
  output logic [N_BANKS-1:0] bank_en,
  output logic [OUT_W-1:0]   dout
);
  logic [N_COMP-1:0] q;

  sadc_bank_ctrl #(.N_BANKS(N_BANKS)) u_bank_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .gain    (gain),
    .bank_en (bank_en)
  );

  sadc_comparator_bank #(
    .N_COMP  (N_COMP),
    .N_BANKS (N_BANKS),
    .SEED    (SEED),
    .SIGMA   (SIGMA)
  ) u_comp_bank (
    .clk     (clk),
    .inn     (inn),
    .inp     (inp),
    .bank_en (bank_en),
    .q       (q)
  );

  sadc_ones_counter #(.N(N_COMP)) u_counter (
    .clk   (clk),
    .q     (q),
    .count (dout)
  );
endmodule
