// dfe_source: sample source that stands in for the digital front-end.
//
// Until the ADC and digital down-converter exist, the demodulator is fed from
// two on-chip sample memories, one for the in-phase (I) and one for the
// quadrature (Q) component, whose contents are replayed cyclically.  The
// memories hold a time-synchronized, frequency-corrected DAB baseband stream
// starting with the Null symbol of a frame, so `sof` (start of frame) is
// raised with the sample at address 0.
//
// Interface: the memories are filled through the load port (`ld_we`,
// `ld_addr`, `ld_re`, `ld_im`); the hardware reads them as a ROM.  While `run`
// is high one sample is emitted every CLK_PER_SAMPLE clocks (the 2.048 MHz
// sample rate derived from the system clock) on `out_valid`/`out`, with
// `out_sof` on address 0.  Addresses wrap after `len` samples.  Read data
// appears one clock after the strobe (registered memory read).
//
// The cyclic replay of stored I/Q data follows the design being modelled; the
// load port, the memory depth and the sample strobe divider are choices of
// this implementation.
module dfe_source
  import dab_pkg::*;
#(
  parameter int unsigned AW      = 15,              // 32768 samples of storage
  parameter int unsigned CLK_DIV = CLK_PER_SAMPLE   // clocks per sample
) (
  input  logic              clk,
  input  logic              rst_n,
  // load port
  input  logic              ld_we,
  input  logic [AW-1:0]     ld_addr,
  input  cplx16_t           ld_data,
  // replay control
  input  logic              run,
  input  logic [AW:0]       len,      // number of stored samples, 1..2**AW
  // sample stream
  output logic              out_valid,
  output logic              out_sof,
  output cplx16_t           out
);
  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [SAMPLE_W-1:0] mem_i [2**AW];
  logic [SAMPLE_W-1:0] mem_q [2**AW];

  logic [DW-1:0] div;
  logic [AW-1:0] addr;
  logic          strobe;

  assign strobe = run && (div == '0);

  always_ff @(posedge clk) begin
    if (ld_we) begin
      mem_i[ld_addr] <= ld_data.re;
      mem_q[ld_addr] <= ld_data.im;
    end
  end

  always_ff @(posedge clk) begin
    out.re <= mem_i[addr];
    out.im <= mem_q[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      addr      <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= strobe;
      out_sof   <= strobe && (addr == '0);
      if (!run) begin
        div  <= '0;
        addr <= '0;
      end else begin
        div <= (div == DW'(CLK_DIV - 1)) ? '0 : div + 1'b1;
        if (strobe)
          addr <= ({1'b0, addr} + 1'b1 >= len) ? '0 : addr + 1'b1;
      end
    end
  end
endmodule
