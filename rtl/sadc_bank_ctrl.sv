// sadc_bank_ctrl: gain control of the variable-gain stochastic ADC.
//
// The converter replaces a variable-gain amplifier by switching comparator
// banks on: as the echo fades, more banks take part and the count for the
// same input grows. This block turns a gain setting, the number of banks to
// enable (0 to N_BANKS, larger values clamp to N_BANKS), into the thermometer
// code BANK_EN, bank 0 first. The enables are registered on the rising clock
// edge, the edge on which the comparators decide, so the setting present at
// that edge applies to the sample decided there, whole. An active-low
// asynchronous reset enables every bank. The encoding, the register and the
// reset state are this design's choices; the text only names the enables.
module sadc_bank_ctrl #(
  parameter int unsigned N_BANKS = 3,
  localparam int unsigned GAIN_W = $clog2(N_BANKS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [GAIN_W-1:0]  gain,
  output logic [N_BANKS-1:0] bank_en
);
  logic [N_BANKS-1:0] en_next;

  always_comb begin
    for (int unsigned b = 0; b < N_BANKS; b++)
      en_next[b] = (32'(gain) > b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bank_en <= '1;
    else        bank_en <= en_next;
  end

  // Out of reset the enables always form a thermometer code from bank 0 up.
  property p_thermometer;
    @(posedge clk) disable iff (!rst_n) (bank_en & (bank_en + 1'b1)) == '0;
  endproperty
  a_thermometer: assert property (p_thermometer)
    else $error("bank enables are not a thermometer code: %b", bank_en);
endmodule
