// sample_cdc -- moves one data word per event from one clock domain to
// another.
//
// The source registers the word and flips a toggle bit on each `src_valid`
// pulse; the toggle crosses through cdc_sync (two flip-flops, as the document
// prescribes for single-bit signals), and when the destination sees it change
// it copies the held word, which has been stable since before the toggle
// moved, and pulses `dst_valid`. The word must not change again before the
// copy (about 4 destination cycles): audio frames are 1041 system clocks or
// 256 XCK cycles apart. This handshake is this design's choice; the document
// specifies only the synchronizer for single bits and a dcfifo for the
// capture path.
module sample_cdc #(
  parameter int unsigned W = 48
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic         src_valid,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic         dst_valid,
  output logic [W-1:0] dst_data
);
  logic [W-1:0] hold;
  logic         tog_src, tog_dst, tog_dst_d;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      hold    <= '0;
      tog_src <= 1'b0;
    end else if (src_valid) begin
      hold    <= src_data;
      tog_src <= ~tog_src;
    end
  end

  cdc_sync #(.STAGES(2)) u_sync (
    .clk (dst_clk),
    .rst (dst_rst),
    .d   (tog_src),
    .q   (tog_dst)
  );

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      tog_dst_d <= 1'b0;
      dst_valid <= 1'b0;
      dst_data  <= '0;
    end else begin
      tog_dst_d <= tog_dst;
      dst_valid <= (tog_dst != tog_dst_d);
      if (tog_dst != tog_dst_d) dst_data <= hold;
    end
  end
endmodule
