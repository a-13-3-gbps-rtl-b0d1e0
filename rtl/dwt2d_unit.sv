// dwt2d_unit: one level of the 2D 9/7M DWT.
//
// A Horizontal DWT unit splits each input row (LL of the level above, or the
// image itself) into a low-pass and a high-pass stream. Each stream feeds its
// own Vertical DWT unit: the low-pass one yields LL (vertical C) and LH
// (vertical D), the high-pass one HL and HH. For an input of W x H samples
// every output sub-band is W/2 x H/2, in raster order. The same unit is used
// for all three levels; DEPTH sets the row FIFOs of the vertical units and
// must be at least W/2. Structure as in the original design.
//
// Interface: one pair stream in, four coefficient streams out, each with
// valid/ready, eol (last of an output row) and eos (last of the frame).
module dwt2d_unit
  import dwt97m_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  pair_t   in_data,
  output logic    ll_valid,
  input  logic    ll_ready,
  output sample_t ll_data,
  output logic    lh_valid,
  input  logic    lh_ready,
  output sample_t lh_data,
  output logic    hl_valid,
  input  logic    hl_ready,
  output sample_t hl_data,
  output logic    hh_valid,
  input  logic    hh_ready,
  output sample_t hh_data
);

  logic    l_valid, l_ready, h_valid, h_ready;
  sample_t l_data, h_data;

  hdwt_unit u_hdwt (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .c_valid(l_valid), .c_ready(l_ready), .c_data(l_data),
    .d_valid(h_valid), .d_ready(h_ready), .d_data(h_data)
  );

  vdwt_unit #(.DEPTH(DEPTH)) u_vdwt_low (
    .clk, .rst_n,
    .in_valid(l_valid), .in_ready(l_ready), .in_data(l_data),
    .c_valid(ll_valid), .c_ready(ll_ready), .c_data(ll_data),
    .d_valid(lh_valid), .d_ready(lh_ready), .d_data(lh_data)
  );

  vdwt_unit #(.DEPTH(DEPTH)) u_vdwt_high (
    .clk, .rst_n,
    .in_valid(h_valid), .in_ready(h_ready), .in_data(h_data),
    .c_valid(hl_valid), .c_ready(hl_ready), .c_data(hl_data),
    .d_valid(hh_valid), .d_ready(hh_ready), .d_data(hh_data)
  );

endmodule
