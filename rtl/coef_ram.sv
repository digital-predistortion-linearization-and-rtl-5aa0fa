// coef_ram: complex coefficient memory for the predistortion lookup table F_m
// and the piecewise pre-equalizer taps.
//
// One host write port (we/waddr/wdata, one word per clock) and one read port
// with a registered output, advanced by ce like the datapath it feeds. On
// reset every word is set to INIT: the source starts the gain table at unity
// so that the predistorter initially passes the signal unchanged; the
// equalizer tables start at zero for the same reason.
//
// Timing: rdata = mem[raddr] one sample after raddr; a write lands at the
// next clock edge (write and read of the same address in one cycle return
// the old word).
module coef_ram
  import dpd_pkg::*;
#(
  parameter int    DEPTH = 256,
  parameter coef_t INIT  = '{i: 16'sd16384, q: 16'sd0},
  localparam int   AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  coef_t         wdata,
  input  logic [AW-1:0] raddr,
  output coef_t         rdata
);

  coef_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) mem[k] <= INIT;
      rdata <= INIT;
    end else begin
      if (we) mem[waddr] <= wdata;
      if (ce) rdata <= mem[raddr];
    end
  end

endmodule
