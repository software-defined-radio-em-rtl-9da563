// bit_error_counter: on-chip comparison of the demodulated bits with
// reference bits.
//
// With a free-running clock the host cannot follow the receiver's output bit
// by bit, so the expected bit stream is stored on the chip and compared there;
// the host only polls the error count.  The reference memory is filled
// through the load port and replayed cyclically over `len` bits.  Its read
// pointer returns to 0 with the first bit of the first data symbol of every
// frame (`in_frame_first`), so the reference holds the bits of the data
// symbols of one frame in order (3072 bits per symbol).  Every `in_valid` bit
// is compared with the reference bit at the pointer; `bit_count` counts the
// compared bits and `err_count` the mismatches.  `clr` zeroes both counts.
// The comparison and counts are registered: they include a bit one clock
// after it arrives.
module bit_error_counter #(
  parameter int unsigned AW = 15,   // 32768 reference bits
  parameter int unsigned CW = 32    // counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic          ld_bit,
  input  logic [AW:0]   len,
  input  logic          clr,
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic          in_frame_first,
  output logic [CW-1:0] bit_count,
  output logic [CW-1:0] err_count
);
  logic          ref_mem [2**AW];
  logic [AW-1:0] ptr, rd_addr;

  always_ff @(posedge clk) begin
    if (ld_we) ref_mem[ld_addr] <= ld_bit;
  end

  assign rd_addr = in_frame_first ? '0 : ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      bit_count <= '0;
      err_count <= '0;
    end else begin
      if (clr) begin
        bit_count <= '0;
        err_count <= '0;
      end else if (in_valid) begin
        bit_count <= bit_count + 1'b1;
        if (in_bit != ref_mem[rd_addr]) err_count <= err_count + 1'b1;
      end
      if (in_valid)
        ptr <= ({1'b0, rd_addr} + 1'b1 >= len) ? '0 : rd_addr + 1'b1;
    end
  end
endmodule
