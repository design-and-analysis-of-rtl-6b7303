// sadc_ones_counter: pipelined Wallace-tree ones-counter, the digital back
// end of the stochastic flash ADC.
//
// It counts the ones in the N-bit comparator vector q. Each pipeline stage
// groups the bits of every weight column in threes into full adders: the sum
// stays in the column, the carry moves one column up, and the one or two bits
// left over pass through. A register follows every stage. Stage 1 thus adds
// q[0]+q[1]+q[2], q[3]+q[4]+q[5], ... into sum bits of weight 1 and carries of
// weight 2; stage 2 adds those sums and carries in threes again, and so on
// (column heights are worked out at elaboration by the wt_* functions of
// sadc_pkg). When no column holds more than two bits, a final registered
// two-row adder gives the binary count. For N = 1024 this takes 16 adder
// stages plus the final adder.
//
// Timing: all registers take the falling clock edge, the comparators decide
// on the rising edge. count reflects the q sampled LATENCY falling edges
// earlier; a new vector is accepted every cycle. The registers have no reset:
// the first LATENCY outputs after power-up are meaningless.
// Following the design: the full-adder tree, the adder-per-three-bits
// grouping and a register after every adder stage. This design's own
// choices: the pass-through of leftover bits and the final carry-propagate
// adder, which the design leaves open.
module sadc_ones_counter
  import sadc_pkg::*;
#(
  parameter  int unsigned N       = 1024,
  localparam int unsigned W       = wt_cols(N),
  localparam int unsigned S       = wt_stages(N),
  localparam int unsigned LATENCY = S + 1
) (
  input  logic         clk,
  input  logic [N-1:0] q,
  output logic [W-1:0] count
);
  for (genvar s = 0; s < S; s++) begin : g_st
    localparam int TIN  = wt_total(N, s);
    localparam int TOUT = wt_total(N, s + 1);

    logic [TIN-1:0]  src;
    logic [TOUT-1:0] d;
    logic [TOUT-1:0] r;

    if (s == 0) begin : g_src
      assign src = q;
    end else begin : g_src
      assign src = g_st[s-1].r;
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H   = wt_height(N, s, c);
      localparam int N3  = H / 3;
      localparam int REM = H % 3;
      localparam int OI  = wt_offset(N, s, c);
      localparam int OO  = wt_offset(N, s + 1, c);
      // Where carries of this column land in the next column.
      localparam int OC  = wt_offset(N, s + 1, c + 1)
                           + wt_height(N, s, c + 1) / 3
                           + wt_height(N, s, c + 1) % 3;

      for (genvar f = 0; f < N3; f++) begin : g_fa
        if (c < W - 1) begin : g_full
          sadc_full_adder u_fa (
            .a  (src[OI + 3*f]),
            .b  (src[OI + 3*f + 1]),
            .ci (src[OI + 3*f + 2]),
            .s  (d[OO + f]),
            .co (d[OC + f])
          );
        end else begin : g_top
          // Top column: the carry would have weight 2**W and is always zero.
          assign d[OO + f] = src[OI + 3*f] ^ src[OI + 3*f + 1] ^ src[OI + 3*f + 2];
        end
      end

      for (genvar p = 0; p < REM; p++) begin : g_pass
        assign d[OO + N3 + p] = src[OI + 3*N3 + p];
      end
    end

    always_ff @(negedge clk) r <= d;
  end

  // Final two-row adder.
  localparam int TL = wt_total(N, S);
  logic [TL-1:0] last;
  logic [W-1:0]  row_a;
  logic [W-1:0]  row_b;

  if (S == 0) begin : g_last
    assign last = q;
  end else begin : g_last
    assign last = g_st[S-1].r;
  end

  for (genvar c = 0; c < W; c++) begin : g_row
    localparam int H = wt_height(N, S, c);
    localparam int O = wt_offset(N, S, c);
    if (H >= 1) begin : g_a
      assign row_a[c] = last[O];
    end else begin : g_a0
      assign row_a[c] = 1'b0;
    end
    if (H >= 2) begin : g_b
      assign row_b[c] = last[O + 1];
    end else begin : g_b0
      assign row_b[c] = 1'b0;
    end
  end

  always_ff @(negedge clk) count <= row_a + row_b;
endmodule
