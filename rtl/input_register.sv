// input_register: mask and edge detection stage for the 256 strip hits.
//
// Every BC the selected hit source is ANDed with the mask bits
// (masked = source & maskbits, a 0 mask bit turns a bad or noisy strip off)
// and shifted into a three-deep window per strip: s0 (oldest), s1, s2 (newest).
// The output hit of a strip follows the edge detection mode, with the hit
// pattern written oldest sample first:
//   HIT   (00)  1XX or X1X or XX1   any of the three samples
//   LEVEL (01)  X1X                 the middle sample
//   EDGE  (10)  01X                 a 0 followed by a 1
//   CLEAR (11)  none                all outputs 0
// The mask equation and the four modes are those of the ABCStar description.
// The working modes are named there but not specified; this design takes the
// hit source from: the strip inputs (data taking), the 4-bit BCID repeated over
// the strips (BCID printing), the mask bits themselves (mask loading), or a
// one-BC test pulse on every strip (pulse test).
//
// Timing: a source sample taken at rising BC edge k appears at hits_out after
// rising edge k+2 in LEVEL and EDGE mode (it is then the middle sample);
// bcid_out is the BCID of that middle sample, so hits_out and bcid_out belong
// to the same bunch crossing. Reset clears the window and the outputs.
module input_register
  import abc_pkg::*;
#(
  parameter int unsigned N = NSTRIPS
) (
  input  logic              clk,          // BC, 40 MHz
  input  logic              rst_n,
  input  logic [N-1:0]      stripdata,    // discriminator outputs
  input  logic [N-1:0]      maskbits,     // 1 = strip enabled
  input  edge_mode_e        edge_mode,
  input  work_mode_e        work_mode,
  input  logic              test_pulse,   // one-BC digital test pulse
  input  logic [BCID_W-1:0] bcid,         // BCID of the current BC
  output logic [N-1:0]      hits_out,     // InReg_out
  output logic [BCID_W-1:0] bcid_out
);

  logic [N-1:0] source, masked;
  logic [N-1:0] s0, s1, s2;
  logic [BCID_W-1:0] bcid_d1, bcid_d2;
  logic [N-1:0] detect;

  always_comb begin
    unique case (work_mode)
      WM_DATA:  source = stripdata;
      WM_BCID:  source = {(N/BCID_W){bcid}};
      WM_MASK:  source = maskbits;
      WM_PULSE: source = {N{test_pulse}};
    endcase
    masked = source & maskbits;
  end

  always_comb begin
    unique case (edge_mode)
      EDGE_HIT:   detect = s0 | s1 | s2;
      EDGE_LEVEL: detect = s1;
      EDGE_EDGE:  detect = ~s0 & s1;
      EDGE_CLEAR: detect = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '0; s1 <= '0; s2 <= '0;
      bcid_d1 <= '0; bcid_d2 <= '0;
      hits_out <= '0; bcid_out <= '0;
    end else begin
      s2 <= masked;
      s1 <= s2;
      s0 <= s1;
      bcid_d1 <= bcid;
      bcid_d2 <= bcid_d1;
      hits_out <= detect;
      bcid_out <= bcid_d2;
    end
  end

  // ---------------- checks of the rules above ----------------
  // Sampled at edge k+1, hits_out holds the result computed from the samples
  // taken at edges k-3 (oldest), k-2 (middle) and k-1, in the mode set
  // before edge k.
  // 'settled': four BCs out of reset, so the whole window is real data.
  property window_check(logic cond, logic ok);
    @(posedge clk) disable iff (!rst_n)
      ($past(rst_n, 1) && $past(rst_n, 2) && $past(rst_n, 3) && $past(rst_n, 4) && cond) |-> ok;
  endproperty

  pip_ThreeBC_hit_ass: assert property (window_check($past(edge_mode) == EDGE_HIT,
    hits_out == ($past(masked, 4) | $past(masked, 3) | $past(masked, 2))));
  pip_ThreeBC_lev_ass: assert property (window_check($past(edge_mode) == EDGE_LEVEL,
    hits_out == $past(masked, 3)));
  pip_ThreeBC_edge_ass: assert property (window_check($past(edge_mode) == EDGE_EDGE,
    hits_out == (~$past(masked, 4) & $past(masked, 3))));
  pip_clear_ass: assert property (window_check($past(edge_mode) == EDGE_CLEAR,
    hits_out == '0));

  // Source selection and masking, one check per working mode.
  pip_datatakingmod_ass: assert property (@(posedge clk) disable iff (!rst_n)
    ($past(rst_n) && $past(work_mode) == WM_DATA) |-> s2 == $past(stripdata & maskbits));
  pip_tstprinBCIDmod_ass: assert property (@(posedge clk) disable iff (!rst_n)
    ($past(rst_n) && $past(work_mode) == WM_BCID) |-> s2 == $past({(N/BCID_W){bcid}} & maskbits));
  pip_loadmaskbitsmod_ass: assert property (@(posedge clk) disable iff (!rst_n)
    ($past(rst_n) && $past(work_mode) == WM_MASK) |-> s2 == $past(maskbits));
  pip_pulsestestmod_ass: assert property (@(posedge clk) disable iff (!rst_n)
    ($past(rst_n) && $past(work_mode) == WM_PULSE) |-> s2 == $past({N{test_pulse}} & maskbits));

endmodule
