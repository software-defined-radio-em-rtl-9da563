// qpsk_demapper: QPSK symbol demapper (hard decisions).
//
// Each QPSK symbol n of an OFDM symbol carries bit n in the sign of its real
// part and bit K + n in the sign of its imaginary part (K = 1536): a negative
// value means 1, a positive one 0 (a zero counts as positive here).  No phase
// is computed, only the sign bits are looked at.
//
// The real-part bits go straight out as the symbols arrive; the output is
// combinational, so bit n leaves in the same clock as symbol n.  The
// imaginary-part bits are stored in a 1-bit FIFO of depth K and, once the
// K-th real bit has gone out, are read out on the following K clocks.  So
// every OFDM symbol yields the 2K = 3072 bits in the order the transmitter's
// mapper consumed them.  `out_first` marks bit 0 of a symbol and
// `out_frame_first` bit 0 of the first data symbol of a frame.  A symbol
// that arrives while the imaginary bits are still being read out is dropped
// and sets the sticky `collision` flag.
module qpsk_demapper
  import dab_pkg::*;
#(
  parameter int unsigned W = 2 * SAMPLE_W + 1,
  parameter int unsigned K = K_CARR
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic                in_frame_first,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic                out_bit,
  output logic                out_first,
  output logic                out_frame_first,
  output logic                collision
);
  localparam int unsigned KW = $clog2(K + 1);

  logic          draining;
  logic [KW-1:0] cnt;
  logic          take;
  logic          f_dout, f_empty, f_full;
  logic [$clog2(K+1)-1:0] f_count;

  assign take = in_valid && !draining;

  sync_fifo #(.WIDTH(1), .DEPTH(K)) u_imag_fifo (
    .clk, .rst_n, .clear(1'b0),
    .push(take), .din(in_im[W-1]),
    .pop(draining), .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count)
  );

  always_comb begin
    if (draining) begin
      out_valid       = 1'b1;
      out_bit         = f_dout;
      out_first       = 1'b0;
      out_frame_first = 1'b0;
    end else begin
      out_valid       = in_valid;
      out_bit         = in_re[W-1];
      out_first       = in_valid && in_first;
      out_frame_first = in_valid && in_first && in_frame_first;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining  <= 1'b0;
      cnt       <= '0;
      collision <= 1'b0;
    end else begin
      if (in_valid && draining) collision <= 1'b1;
      if (!draining) begin
        if (take) begin
          if ((in_first ? '0 : cnt) == KW'(K - 1)) begin
            cnt      <= '0;
            draining <= 1'b1;
          end else begin
            cnt <= (in_first ? '0 : cnt) + 1'b1;
          end
        end
      end else begin
        cnt <= cnt + 1'b1;
        if (cnt == KW'(K - 1)) begin
          cnt      <= '0;
          draining <= 1'b0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) draining |-> !f_empty)
    else $error("imaginary-bit FIFO ran dry");
endmodule
