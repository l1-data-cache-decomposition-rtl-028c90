// steering_table: way predictor of the pseudo set-associative cache.
//
// A table of ENTRIES way pointers indexed by the address of the load or
// store instruction (word-aligned instruction addresses, so bits above the
// low two select the entry). The read port is combinational so the
// prediction is known in the cycle the access starts; the write port
// retrains an entry one clock edge later.
//
// After reset the table fills itself, one entry per cycle, with way
// numbers drawn from a 16-bit LFSR (x^16+x^14+x^13+x^11+1), reduced modulo
// WAYS, giving a near-uniform random spread of pointers. busy is high
// during these ENTRIES cycles and the cache must not use the table then.
// Following the document: 1024 entries, indexing by instruction address,
// random uniform initial contents. This design's choices: the LFSR, the
// fill sequence and dropping the two low instruction-address bits.
module steering_table #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 4,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      rd_pc,
  output logic [WAY_W-1:0] rd_way,
  input  logic             wr_en,
  input  logic [31:0]      wr_pc,
  input  logic [WAY_W-1:0] wr_way,
  output logic             busy
);

  logic [WAY_W-1:0] table_q [ENTRIES];
  logic [IDX_W-1:0] init_idx;
  logic [15:0]      lfsr;
  logic             init_done;

  assign busy   = !init_done;
  assign rd_way = table_q[rd_pc[2 +: IDX_W]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_idx  <= '0;
      init_done <= 1'b0;
      lfsr      <= 16'hACE1;
    end else if (!init_done) begin
      lfsr     <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      init_idx <= init_idx + 1'b1;
      if (init_idx == IDX_W'(ENTRIES - 1)) init_done <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done)
      table_q[init_idx] <= WAY_W'(32'(lfsr) % WAYS);
    else if (wr_en)
      table_q[wr_pc[2 +: IDX_W]] <= wr_way;
  end

endmodule
