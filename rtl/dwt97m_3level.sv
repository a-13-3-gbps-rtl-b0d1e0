// dwt97m_3level: three-level 2D 9/7M integer DWT of CCSDS 122.0-B-1 image
// compression, streaming at two pixels per clock.
//
// Pixels enter in raster order as (x_even, x_odd) pairs with end-of-line and
// end-of-stream flags. Three 2D-DWT units run concurrently as an elastic
// pipeline: level 1 works on the image, level 2 on LL1 and level 3 on LL2.
// LL1 and LL2 leave their vertical units one coefficient per cycle, so a 1:2
// gearbox FIFO regroups each into pairs for the next level. The ten sub-bands
// (LL3, HL3, LH3, HH3, HL2, LH2, HH2, HL1, LH1, HH1, in the order of
// dwt97m_pkg::subband_e) leave on ten independent streams, each in raster
// order of its sub-band with eol at each row end and eos at the frame end.
//
// MAX_WIDTH is the widest image line supported; the actual width and height
// are taken from the flags at run time. Each level's vertical row FIFOs hold
// MAX_WIDTH/2, /4 and /8 coefficients. The image width must be a multiple of
// 8 and at least 24 and the height a multiple of 8 and at least 24, so that
// every level sees rows and columns of even length of at least six samples
// (the same constraints for strips of a push-broom stream, each ended by eos).
// Pixels are PIX_W = 16 bits, unsigned unless PIX_SIGNED is set, and are
// widened to the 20-bit coefficient format at the input.
//
// Throughput: with an always-valid source and always-ready sinks a W x H
// frame takes W*H/2 + 2*H + 3.5*W + a constant number of cycles: the
// horizontal mirroring costs two cycles per level-1 row, the vertical
// mirroring four rows per level at the end of the frame.
module dwt97m_3level
  import dwt97m_pkg::*;
#(
  parameter int MAX_WIDTH  = 4096,
  parameter bit PIX_SIGNED = 1'b0
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // pixel input (AXI4-Stream style)
  input  logic                           s_valid,
  output logic                           s_ready,
  input  logic [PIX_W-1:0]               s_x_even,
  input  logic [PIX_W-1:0]               s_x_odd,
  input  logic                           s_eol,
  input  logic                           s_eos,
  // sub-band outputs, indexed by subband_e
  output logic [NUM_SB-1:0]              m_valid,
  input  logic [NUM_SB-1:0]              m_ready,
  output logic [NUM_SB-1:0][COEF_W-1:0]  m_data,
  output logic [NUM_SB-1:0]              m_eol,
  output logic [NUM_SB-1:0]              m_eos
);

  function automatic coef_t widen(input logic [PIX_W-1:0] px);
    return PIX_SIGNED ? coef_t'(signed'(px)) : coef_t'({1'b0, px});
  endfunction

  pair_t   l_in_data [3];
  logic    l_in_valid[3], l_in_ready[3];
  sample_t ll_data   [3];
  logic    ll_valid  [3], ll_ready  [3];
  sample_t sb_data   [NUM_SB];

  assign l_in_valid[0] = s_valid;
  assign s_ready       = l_in_ready[0];
  assign l_in_data[0]  = '{x_even: widen(s_x_even), x_odd: widen(s_x_odd),
                           eol: s_eol, eos: s_eos};

  // Output stream index of LH, HL, HH of each level.
  localparam subband_e SB_LH [3] = '{SB_LH1, SB_LH2, SB_LH3};
  localparam subband_e SB_HL [3] = '{SB_HL1, SB_HL2, SB_HL3};
  localparam subband_e SB_HH [3] = '{SB_HH1, SB_HH2, SB_HH3};

  for (genvar k = 0; k < 3; k++) begin : g_level
    dwt2d_unit #(.DEPTH(MAX_WIDTH >> (k + 1))) u_dwt2d (
      .clk, .rst_n,
      .in_valid(l_in_valid[k]), .in_ready(l_in_ready[k]), .in_data(l_in_data[k]),
      .ll_valid(ll_valid[k]), .ll_ready(ll_ready[k]), .ll_data(ll_data[k]),
      .lh_valid(m_valid[SB_LH[k]]), .lh_ready(m_ready[SB_LH[k]]), .lh_data(sb_data[SB_LH[k]]),
      .hl_valid(m_valid[SB_HL[k]]), .hl_ready(m_ready[SB_HL[k]]), .hl_data(sb_data[SB_HL[k]]),
      .hh_valid(m_valid[SB_HH[k]]), .hh_ready(m_ready[SB_HH[k]]), .hh_data(sb_data[SB_HH[k]])
    );

    if (k < 2) begin : g_gearbox
      gearbox_fifo u_gearbox (
        .clk, .rst_n,
        .in_valid(ll_valid[k]), .in_ready(ll_ready[k]), .in_data(ll_data[k]),
        .out_valid(l_in_valid[k+1]), .out_ready(l_in_ready[k+1]), .out_data(l_in_data[k+1])
      );
    end else begin : g_ll_out
      assign m_valid[SB_LL3] = ll_valid[k];
      assign ll_ready[k]     = m_ready[SB_LL3];
      assign sb_data[SB_LL3] = ll_data[k];
    end
  end

  for (genvar s = 0; s < NUM_SB; s++) begin : g_out
    assign m_data[s] = sb_data[s].data;
    assign m_eol[s]  = sb_data[s].eol;
    assign m_eos[s]  = sb_data[s].eos;
  end

endmodule
