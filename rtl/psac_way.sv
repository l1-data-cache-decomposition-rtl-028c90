// psac_way: one way (one small, independently probed cache) of the pseudo
// set-associative cache: a tag array and a data array with separate enables,
// so a probe can activate the tag array alone, the data array alone, or
// both, which is what the phased probing schemes rely on to save energy.
//
// Both arrays read synchronously: the entry of `set` appears on the outputs
// one clock edge after its read enable and is held until the next read.
// Writes take effect on the clock edge; the data array writes bytes
// selected by data_wr_be. Valid and dirty bits are flops cleared by reset;
// tags and data are plain memories.
// Following the document: 8 KB per way in the main configuration and
// separately activated tag and data arrays. This design's choices: the
// synchronous single-port arrays and the byte-masked write.
module psac_way
  import l1_pkg::*;
#(
  parameter int unsigned WAY_BYTES = 8192,
  localparam int unsigned SETS  = WAY_BYTES / LINE_BYTES,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned TAG_W = PA_W - OFF_W - SET_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SET_W-1:0] set,
  input  logic             tag_rd_en,
  input  logic             tag_wr_en,
  input  logic             tag_wr_valid,
  input  logic             tag_wr_dirty,
  input  logic [TAG_W-1:0] tag_wr_tag,
  input  logic             data_rd_en,
  input  logic             data_wr_en,
  input  line_be_t         data_wr_be,
  input  line_t            data_wr_data,
  output logic             tag_valid,
  output logic             tag_dirty,
  output logic [TAG_W-1:0] tag_out,
  output line_t            data_out
);

  logic [SETS-1:0]  valid_q, dirty_q;
  logic [TAG_W-1:0] tag_mem  [SETS];
  line_t            data_mem [SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      dirty_q   <= '0;
      tag_valid <= 1'b0;
      tag_dirty <= 1'b0;
    end else begin
      if (tag_rd_en) begin
        tag_valid <= valid_q[set];
        tag_dirty <= dirty_q[set];
      end
      if (tag_wr_en) begin
        valid_q[set] <= tag_wr_valid;
        dirty_q[set] <= tag_wr_dirty;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (tag_rd_en) tag_out <= tag_mem[set];
    if (tag_wr_en) tag_mem[set] <= tag_wr_tag;
    if (data_rd_en) data_out <= data_mem[set];
    if (data_wr_en)
      for (int b = 0; b < int'(LINE_BYTES); b++)
        if (data_wr_be[b]) data_mem[set][b*8 +: 8] <= data_wr_data[b*8 +: 8];
  end

endmodule
