// sadc_comparator_bank: the redundant comparator array of the stochastic
// flash ADC, split into separately enabled banks.
//
// N_COMP comparators all see the same differential input; each one's random
// offset (sadc_pkg::comp_offset, seeded by SEED) acts as its threshold, so the
// number of comparators that decide high follows the cumulative distribution
// of the offsets, a Gaussian CDF of the input.
//
// Banks: comparator i belongs to bank b, the first bank for which
// i < N_COMP >> (N_BANKS-1-b). With the defaults (1024 comparators, 3 banks)
// bank 0 holds comparators 0-255, bank 1 256-511 and bank 2 512-1023, so one,
// two or three enabled banks give 256, 512 or 1024 active comparators, the
// three sizes whose SQNR the design was evaluated at. Each step doubles the
// active comparators, doubling the count for the same input (6 dB of gain)
// and adding about 3 dB of SQNR. The bank sizes are this design's choice.
// The output of a comparator in a disabled bank is forced to zero.
//
// Timing: q changes after each rising clock edge and is stable until the
// next one; bank_en must change on the rising edge too (sadc_bank_ctrl).
// N_COMP must be a multiple of 2**(N_BANKS-1).
module sadc_comparator_bank
  import sadc_pkg::*;
#(
  parameter int unsigned N_COMP  = 1024,
  parameter int unsigned N_BANKS = 3,
  parameter int unsigned SEED    = 1,
  parameter int          SIGMA   = SIGMA_CODES
) (
  input  logic               clk,
  input  vin_t               inn,
  input  vin_t               inp,
  input  logic [N_BANKS-1:0] bank_en,
  output logic [N_COMP-1:0]  q
);
  function automatic int unsigned bank_of(int unsigned i);
    for (int unsigned b = 0; b < N_BANKS; b++)
      if (i < (N_COMP >> (N_BANKS - 1 - b))) return b;
    return N_BANKS - 1;
  endfunction

  initial begin
    assert (N_COMP % (1 << (N_BANKS - 1)) == 0)
      else $error("N_COMP must be a multiple of 2**(N_BANKS-1)");
  end

  logic [N_COMP-1:0] q_raw;

  for (genvar i = 0; i < N_COMP; i++) begin : g_comp
    localparam int          OFF  = comp_offset(i, SEED, SIGMA);
    localparam int unsigned BANK = bank_of(i);

    sadc_comparator #(.OFFSET(OFF)) u_comp (
      .clk (clk),
      .inn (inn),
      .inp (inp),
      .q   (q_raw[i])
    );

    assign q[i] = q_raw[i] & bank_en[BANK];
  end
endmodule
