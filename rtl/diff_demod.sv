// diff_demod: differential demodulation of the DAB carriers.
//
// DAB carries its data as phase differences between the same carrier of two
// consecutive OFDM symbols (pi/4-DQPSK).  This block takes the FFT output of
// each symbol, keeps only the 1536 active carriers and multiplies every one by
// the complex conjugate of the same carrier of the previous symbol:
//   Y = Z_l * conj(Z_{l-1}) = (a + jb)(c - jd) = (ac + bd) + j(bc - ad).
//
// Carrier selection: a counter runs over the 2048 bins of a symbol; bins
// 256..1023 and 1025..1792 are written into the carrier FIFO (FIFO A, one
// for I and Q together), all others are dropped.  The previous symbol's 1536
// carriers wait in FIFO B.  A two-state machine controls the FIFOs:
//   S_REF  - the phase reference symbol (PRS) of a frame is copied from FIFO
//            A into FIFO B; after 1536 carriers it moves to S_DIFF.
//   S_DIFF - every carrier leaving FIFO A is multiplied with the carrier
//            leaving FIFO B and is itself written back into FIFO B, so that
//            it becomes the reference for the next symbol.
// The first bin of a PRS (flag `in_prs`) restarts the machine in S_REF and
// empties both FIFOs, so the demodulation restarts with every frame.  The
// PRS itself produces no output.  The output is a continuous burst of 1536
// products per symbol with `out_first` on carrier 0 and `out_frame_first` on
// carrier 0 of the first data symbol of a frame.
//
// Timing: a selected carrier enters FIFO A one clock after it arrives.  In
// S_DIFF, FIFO A is first allowed to fill with three carriers; from then on
// one carrier leaves per clock, so the 1536 products of a symbol come out on
// consecutive clocks although bin 1024 is missing from the input.  A
// product is ready two clocks after its carriers leave the FIFOs (products,
// then sums, each registered): the first product of a symbol is registered on
// the fifth clock edge after the one that takes bin 256.  Output width is
// 2*W+1 bits, the full width of the sum of two W x W products.
//
// Carrier ranges, FIFO sizes (4 and 2048), the four multipliers, the
// two-state control and starting the reads once three carriers are waiting
// follow the design being modelled; the pipeline registers and the restart
// by the PRS flag are choices of this implementation.
module diff_demod
  import dab_pkg::*;
#(
  parameter int unsigned W       = SAMPLE_W,
  parameter int unsigned LOG2_N  = LOG2N,
  parameter int unsigned K       = K_CARR,
  parameter int unsigned DEPTH_A = 4,
  parameter int unsigned DEPTH_B = 2048
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_prs,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  output logic                 out_first,
  output logic                 out_frame_first,
  output logic signed [2*W:0]  out_re,
  output logic signed [2*W:0]  out_im,
  output logic                 a_overflow
);
  localparam int unsigned N  = 2**LOG2_N;
  localparam int unsigned KW = $clog2(K + 1);

  typedef enum logic {S_REF, S_DIFF} state_t;
  state_t state;

  logic [LOG2_N-1:0] bin;
  logic              restart;
  logic              sel;
  logic [KW-1:0]     ref_cnt, out_cnt;
  logic              frame_first_sym;

  assign restart = in_valid && (bin == '0) && in_prs;
  assign sel     = in_valid && carrier_active(int'(bin), N, K);

  // ---------------------------------------------------------------- FIFOs
  logic            a_push, a_pop, a_empty, a_full, b_push, b_pop, b_empty, b_full;
  logic [2*W-1:0]  a_din, a_dout, b_dout;
  logic [$clog2(DEPTH_A+1)-1:0] a_count;
  logic [$clog2(DEPTH_B+1)-1:0] b_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_push <= 1'b0;
      a_din  <= '0;
    end else begin
      a_push <= sel;
      a_din  <= {in_re, in_im};
    end
  end

  sync_fifo #(.WIDTH(2*W), .DEPTH(DEPTH_A)) u_fifo_a (
    .clk, .rst_n, .clear(restart),
    .push(a_push), .din(a_din), .pop(a_pop),
    .dout(a_dout), .empty(a_empty), .full(a_full), .count(a_count)
  );

  sync_fifo #(.WIDTH(2*W), .DEPTH(DEPTH_B)) u_fifo_b (
    .clk, .rst_n, .clear(restart),
    .push(b_push), .din(a_dout), .pop(b_pop),
    .dout(b_dout), .empty(b_empty), .full(b_full), .count(b_count)
  );

  // In S_DIFF the reading of a symbol starts once FIFO A holds PRIME
  // carriers and then goes on every clock until its K carriers are done; the
  // lead absorbs the gap of the unused centre bin, so the output is one
  // unbroken burst of K products.
  localparam int unsigned PRIME = DEPTH_A - 1;

  logic          mult_en, rd_go;
  logic [KW-1:0] pop_cnt;
  always_comb begin
    a_pop   = 1'b0;
    b_pop   = 1'b0;
    b_push  = 1'b0;
    mult_en = 1'b0;
    if (!restart && !a_empty) begin
      if (state == S_REF) begin
        a_pop  = 1'b1;
        b_push = 1'b1;
      end else if (!b_empty && (rd_go || a_count >= ($bits(a_count))'(PRIME))) begin
        a_pop   = 1'b1;
        b_pop   = 1'b1;
        b_push  = 1'b1;
        mult_en = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_REF;
      bin        <= '0;
      ref_cnt    <= '0;
      a_overflow <= 1'b0;
      rd_go      <= 1'b0;
      pop_cnt    <= '0;
    end else begin
      if (restart) begin
        rd_go   <= 1'b0;
        pop_cnt <= '0;
      end else if (mult_en) begin
        if (pop_cnt == KW'(K - 1)) begin
          rd_go   <= 1'b0;
          pop_cnt <= '0;
        end else begin
          rd_go   <= 1'b1;
          pop_cnt <= pop_cnt + 1'b1;
        end
      end
      if (in_valid) bin <= bin + 1'b1;
      if (a_push && a_full) a_overflow <= 1'b1;
      if (restart) begin
        state   <= S_REF;
        ref_cnt <= '0;
      end else if (state == S_REF && a_pop) begin
        ref_cnt <= ref_cnt + 1'b1;
        if (ref_cnt == KW'(K - 1)) state <= S_DIFF;
      end
    end
  end

  // ---------------------------------------------------------------- multiply
  logic signed [W-1:0]   a, b, c, d;
  logic signed [2*W-1:0] ac, bd, bc, ad;
  logic                  m_v;

  assign {a, b} = a_dout;   // current symbol
  assign {c, d} = b_dout;   // previous symbol

  always_ff @(posedge clk) begin
    if (mult_en) begin
      ac <= a * c;
      bd <= b * d;
      bc <= b * c;
      ad <= a * d;
    end
    if (m_v) begin
      out_re <= (2*W+1)'(ac) + (2*W+1)'(bd);
      out_im <= (2*W+1)'(bc) - (2*W+1)'(ad);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_v             <= 1'b0;
      out_valid       <= 1'b0;
      out_first       <= 1'b0;
      out_frame_first <= 1'b0;
      out_cnt         <= '0;
      frame_first_sym <= 1'b1;
    end else begin
      m_v       <= mult_en;
      out_valid <= m_v;
      out_first <= m_v && (out_cnt == '0);
      out_frame_first <= m_v && (out_cnt == '0) && frame_first_sym;
      if (restart) begin
        out_cnt         <= '0;
        frame_first_sym <= 1'b1;
      end else if (m_v) begin
        if (out_cnt == KW'(K - 1)) begin
          out_cnt         <= '0;
          frame_first_sym <= 1'b0;
        end else begin
          out_cnt <= out_cnt + 1'b1;
        end
      end
    end
  end

  // FIFO B holds at most one symbol of carriers.
  assert property (@(posedge clk) disable iff (!rst_n) !(b_push && b_full && !b_pop))
    else $error("previous-symbol FIFO overflow");
endmodule
