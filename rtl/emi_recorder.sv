// emi_recorder: circular sample recorder for later analysis.
//
// While rec_en is high, every valid processed sample is written into a
// REC_DEPTH-entry memory at the write pointer, which then advances and
// wraps, so the memory always holds the most recent REC_DEPTH samples. Each
// entry holds the signed samples of line A and line B and the adder and
// subtractor comparator flags that belong to them:
//   {warn_sum, warn_diff, sample_a, sample_b}.
// Dropping rec_en freezes the contents; they are then read through
// rd_addr/rd_data. wr_ptr is the entry that the next write would use (the
// oldest one once wrapped is set).
//
// Timing: one write per clock; rd_data is registered, one cycle after
// rd_addr.
//
// That the FPGA records data for analysis is the document's; what is
// recorded, the depth and the circular organisation are this design's.
module emi_recorder #(
  parameter int REC_DEPTH = 1024,
  parameter int W         = 14
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         rec_en,
  input  logic                         wr_valid,
  input  logic [W-1:0]                 wr_data,
  input  logic [$clog2(REC_DEPTH)-1:0] rd_addr,
  output logic [W-1:0]                 rd_data,
  output logic [$clog2(REC_DEPTH)-1:0] wr_ptr,
  output logic                         wrapped
);

  localparam int AW = $clog2(REC_DEPTH);

  logic [W-1:0] mem [REC_DEPTH];

  always_ff @(posedge clk) begin
    if (rec_en && wr_valid) mem[wr_ptr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
    end else if (rec_en && wr_valid) begin
      wr_ptr <= (wr_ptr == AW'(REC_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (wr_ptr == AW'(REC_DEPTH - 1)) wrapped <= 1'b1;
    end
  end

endmodule
