// error_counter -- compares decoded bits with the bits that were sent.
//
// Every generated bit is pushed into a FIFO of reference bits; every
// decoded bit pops the oldest reference bit and the two are compared.
// err_count counts mismatches and bit_count compared bits (both
// saturating). A FIFO rather than a fixed delay line keeps the comparison
// aligned even when the data source pauses. DEPTH must cover the bits in
// flight: two frames plus the pipeline. The structure is this design's
// choice; the description only shows an error counter fed by the
// generated and the decoded bits.
module error_counter #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned CW    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ref_valid,
  input  logic          ref_bit,
  input  logic          dec_valid,
  input  logic          dec_bit,
  output logic [CW-1:0] err_count,
  output logic [CW-1:0] bit_count,
  output logic          overflow    // a reference bit was lost
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DEPTH-1:0] fifo;
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      fill;
  logic             push, pop;

  assign push = ref_valid && (fill < (AW+1)'(DEPTH));
  assign pop  = dec_valid && (fill != '0);

  // Reference storage: no reset, a bit is read only after it is written.
  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= ref_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      fill      <= '0;
      err_count <= '0;
      bit_count <= '0;
      overflow  <= 1'b0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (ref_valid && !push) overflow <= 1'b1;
      if (pop) begin
        rp <= rp + 1'b1;
        if (bit_count != '1) bit_count <= bit_count + 1'b1;
        if (fifo[rp] != dec_bit && err_count != '1) err_count <= err_count + 1'b1;
      end
      fill <= fill + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

endmodule
