// Output register.
//
// ENTRIES convolution results of ACC_W bits. Up to four entries are written
// per cycle (four 1D stencils at once); with acc set each write adds to the
// entry instead of replacing it, which is how the passes of a 2D stencil
// larger than the map unit are summed. All entries are read together for a
// store. Writes take effect at the rising edge; two ports naming the same
// entry in one cycle is not allowed (the controller never does it).
// With land set, accumulation is a logic AND (result 1 when both the entry
// and the new value are non-zero), so a multi-pass logic-AND reduce also
// combines correctly. A row write (row_we) replaces all entries at once with
// row_data; it is used for the full-precision results of a matrix
// operation and never coincides with a port write.
// The 16 entries follow the document ("Store 16 output SAD results"); the
// width and the accumulate input are this design's.
module out_reg
  import ce_pkg::*;
#(
  parameter int unsigned ENTRIES = OUT_ENTRIES,
  parameter int unsigned WPORTS  = GROUPS
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [WPORTS-1:0]                     we,
  input  logic                                  acc,
  input  logic                                  land,
  input  logic [WPORTS-1:0][$clog2(ENTRIES)-1:0] idx,
  input  acc_t [WPORTS-1:0]                     wdata,
  input  logic                                  row_we,
  input  acc_t [ENTRIES-1:0]                    row_data,
  output acc_t [ENTRIES-1:0]                    rd_data
);

  acc_t [ENTRIES-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem <= '0;
    else if (row_we) mem <= row_data;
    else
      for (int unsigned p = 0; p < WPORTS; p++)
        if (we[p]) begin
          if (!acc)      mem[idx[p]] <= wdata[p];
          else if (land) mem[idx[p]] <= acc_t'((mem[idx[p]] != '0) && (wdata[p] != '0));
          else           mem[idx[p]] <= mem[idx[p]] + wdata[p];
        end
  end

  assign rd_data = mem;

endmodule
