// coef_bank: the filter coefficient registers.
//
// For every tap pair i (0 = outermost, L/2 = centre) the bank keeps one
// lowpass coefficient h_i and one highpass coefficient g_i, the two-entry
// coefficient register that sits beside each multiplier of the five-tap
// filter structure. All four filters read the same bank. Reset loads H_INIT
// and G_INIT (the 5/3 pair by default); a write (we) replaces one
// coefficient: sel_g chooses g or h, idx the tap pair. Writes take effect on
// the next clock and should be made between runs, since a filter uses
// whatever the registers hold in the cycle it computes. Register contents
// as filter inputs follow the design; the write port is this design's own.
module coef_bank
  import dwt_pkg::*;
#(
  parameter int    L      = 5,
  parameter coef_t H_INIT [L/2+1] = H53,
  parameter coef_t G_INIT [L/2+1] = G53,
  localparam int   IDX_CW = $clog2(L/2+1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic              sel_g,
  input  logic [IDX_CW-1:0] idx,
  input  coef_t             wdata,
  output coef_t             h_coef [L/2+1],
  output coef_t             g_coef [L/2+1]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_coef <= H_INIT;
      g_coef <= G_INIT;
    end else if (we && int'(idx) <= L/2) begin
      if (sel_g) g_coef[idx] <= wdata;
      else       h_coef[idx] <= wdata;
    end
  end

endmodule
