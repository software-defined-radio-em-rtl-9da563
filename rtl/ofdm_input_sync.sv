// ofdm_input_sync: symbol framing and buffering in front of the FFT.
//
// The incoming sample stream is assumed to be time-synchronized and frequency
// corrected: `in_sof` marks the first sample of a frame, i.e. the first sample
// of the Null symbol.  A counter steps through the frame: the T_NULL samples
// of the Null symbol are dropped, then for every OFDM symbol the T_CP
// cyclic-prefix samples are dropped and the T_U useful samples are written
// into two FIFOs, one for I and one for Q.  The first symbol after the Null
// symbol is the phase reference symbol (PRS); its samples carry a flag bit in
// the I FIFO so the flag stays with the data whatever the FFT's backlog.
//
// The FFT reads only once the FIFOs hold a whole symbol, so it can process it
// at once: when the fill level reaches T_U and the FFT is ready, the T_U
// samples are read out on consecutive clocks (`out_valid`), the first one
// with `out_start`, each with `out_prs`.  Samples that arrive while the
// FIFOs are full are lost and raise the sticky `overflow` flag.
//
// Timing: out_start follows the last useful sample of a symbol by two clocks
// when the FFT is idle.  FIFO depth T_U follows from a FIFO that gathers one
// whole symbol; the Null/prefix counting and the PRS flag are choices of this
// implementation.
module ofdm_input_sync
  import dab_pkg::*;
#(
  parameter int unsigned TU    = FFT_N,
  parameter int unsigned TCP   = T_CP,
  parameter int unsigned TNULL = T_NULL
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_sof,
  input  cplx16_t in_data,
  input  logic    fft_ready,
  output logic    out_valid,
  output logic    out_start,
  output logic    out_prs,
  output cplx16_t out_data,
  output logic    overflow
);
  localparam int unsigned CW = $clog2(TNULL > TU ? TNULL + 1 : TU + 1);

  typedef enum logic [1:0] {S_WAIT, S_NULL, S_PREFIX, S_USEFUL} state_t;
  state_t          state;
  logic [CW-1:0]   cnt;
  logic            first_sym;

  // FIFO write side
  logic                fifo_push, fifo_pop, i_full;
  logic [SAMPLE_W:0]   i_dout;
  logic [SAMPLE_W-1:0] q_dout;
  logic [$clog2(TU+1)-1:0] fill, q_fill;
  logic                i_empty, q_empty, q_full;

  // When in_sof arrives the sample is the first of the Null symbol.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_WAIT;
      cnt       <= '0;
      first_sym <= 1'b0;
    end else if (in_valid) begin
      if (in_sof) begin
        state     <= (TNULL > 1) ? S_NULL : S_PREFIX;
        cnt       <= CW'(1);
        first_sym <= 1'b1;
      end else begin
        unique case (state)
          S_WAIT: ;
          S_NULL: begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(TNULL - 1)) begin state <= S_PREFIX; cnt <= '0; end
          end
          S_PREFIX: begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(TCP - 1)) begin state <= S_USEFUL; cnt <= '0; end
          end
          S_USEFUL: begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(TU - 1)) begin
              state     <= S_PREFIX;
              cnt       <= '0;
              first_sym <= 1'b0;
            end
          end
          default: state <= S_WAIT;
        endcase
      end
    end
  end

  assign fifo_push = in_valid && !in_sof && (state == S_USEFUL);

  sync_fifo #(.WIDTH(SAMPLE_W + 1), .DEPTH(TU)) u_fifo_i (
    .clk, .rst_n, .clear(1'b0),
    .push(fifo_push), .din({first_sym, in_data.re}),
    .pop(fifo_pop), .dout(i_dout), .empty(i_empty), .full(i_full), .count(fill)
  );
  sync_fifo #(.WIDTH(SAMPLE_W), .DEPTH(TU)) u_fifo_q (
    .clk, .rst_n, .clear(1'b0),
    .push(fifo_push), .din(in_data.im),
    .pop(fifo_pop), .dout(q_dout), .empty(q_empty), .full(q_full), .count(q_fill)
  );

  // Read side: burst of TU samples once a whole symbol is buffered.
  logic [CW-1:0] rd_cnt;
  logic          reading;

  assign fifo_pop = reading;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      rd_cnt    <= '0;
      out_valid <= 1'b0;
      out_start <= 1'b0;
      out_prs   <= 1'b0;
      out_data  <= '0;
      overflow  <= 1'b0;
    end else begin
      if (fifo_push && i_full) overflow <= 1'b1;
      out_valid <= reading;
      out_start <= reading && (rd_cnt == '0);
      out_prs   <= i_dout[SAMPLE_W];
      out_data  <= '{re: i_dout[SAMPLE_W-1:0], im: q_dout};
      if (!reading) begin
        if (fill == ($bits(fill))'(TU) && fft_ready) begin
          reading <= 1'b1;
          rd_cnt  <= '0;
        end
      end else begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == CW'(TU - 1)) reading <= 1'b0;
      end
    end
  end

  // The two FIFOs are written and read together.
  assert property (@(posedge clk) disable iff (!rst_n) fill == q_fill)
    else $error("I and Q FIFOs out of step");
  assert property (@(posedge clk) disable iff (!rst_n) !(reading && i_empty))
    else $error("read burst from an empty FIFO");
endmodule
