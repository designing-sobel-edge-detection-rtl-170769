// sobel_output - result frame memory, output counter and done flag.
//
// Each valid result is written into a W x H frame memory at its pixel
// address, and also presented on output_image / output_edge with
// output_valid for a streaming consumer. output_count counts the results
// written since `start`; `done` rises when W*H results have been written and
// stays high until the next `start`. A host reads the stored edge image
// through rd_addr, with rd_result valid one clock later (synchronous read).
// Each stored word holds the 8-bit magnitude pixel and the binary edge bit.
//
// Timing: the write, the counter update and the streaming outputs all take
// effect one clock after in_valid; done rises together with the final count.
//
// Storing the edge image in memory and counting outputs follows the design
// (the output_count and done signals appear in its simulation); the memory
// word layout, read port and streaming outputs are choices of this
// implementation.
module sobel_output
  import sobel_pkg::*;
#(
  parameter int unsigned W = 64,
  parameter int unsigned H = 64,
  localparam int unsigned NPIX = W * H,
  localparam int unsigned AW   = $clog2(NPIX),
  localparam int unsigned CW   = $clog2(NPIX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          in_valid,
  input  logic [AW-1:0] addr,
  input  result_t       result,
  // streaming view
  output logic          output_valid,
  output pixel_t        output_image,
  output logic          output_edge,
  output logic [CW-1:0] output_count,
  output logic          done,
  // host read port
  input  logic [AW-1:0] rd_addr,
  output result_t       rd_result
);

  result_t mem [NPIX];

  always_ff @(posedge clk) begin
    if (in_valid) mem[addr] <= result;
    rd_result <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      output_valid <= 1'b0;
      output_image <= '0;
      output_edge  <= 1'b0;
      output_count <= '0;
      done         <= 1'b0;
    end else begin
      output_valid <= in_valid;
      if (in_valid) begin
        output_image <= result.mag8;
        output_edge  <= result.edge_bit;
      end
      if (start) begin
        output_count <= '0;
        done         <= 1'b0;
      end else if (in_valid && !done) begin
        output_count <= output_count + 1'b1;
        if (output_count == CW'(NPIX - 1)) done <= 1'b1;
      end
    end
  end

  // A frame never holds more than W*H results.
  a_count_bound: assert property (@(posedge clk) disable iff (rst)
    output_count <= CW'(NPIX));

endmodule
