// latency_counter: measures the source-to-destination latency of one probe
// message at a time.
//
// When the watched source sends a message header (send_valid, send_tag) and
// no probe is outstanding, the counter latches that tag and starts counting
// cycles. When a header carrying the same tag arrives at the destination
// (recv_valid, recv_tag), the count is latched on latency with lat_valid for
// one cycle, the counter is reset and the next header sent becomes the new
// probe. The count includes the cycle of sending: a header seen at the
// destination k cycles after it was sent reads as k. samples counts the
// measurements; probe_tag shows the tag being waited for. Measuring with a counter that runs from sending until the
// expected data arrives, then latching the next sent value, follows the
// published measurement set-up; the tag width and the interface are this
// design's choice.
module latency_counter #(
  parameter int unsigned TAG_W = 23,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             send_valid,
  input  logic [TAG_W-1:0] send_tag,
  input  logic             recv_valid,
  input  logic [TAG_W-1:0] recv_tag,
  output logic             lat_valid,
  output logic [CNT_W-1:0] latency,
  output logic [31:0]      samples,
  output logic             active,
  output logic [TAG_W-1:0] probe_tag    // tag of the outstanding probe
);

  logic [TAG_W-1:0] tag_q;
  assign probe_tag = tag_q;
  logic [CNT_W-1:0] cnt;
  logic             hit;

  assign hit = active && recv_valid && (recv_tag == tag_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      tag_q     <= '0;
      cnt       <= '0;
      lat_valid <= 1'b0;
      latency   <= '0;
      samples   <= '0;
    end else begin
      lat_valid <= 1'b0;
      if (hit) begin
        active    <= 1'b0;
        lat_valid <= 1'b1;
        latency   <= cnt;
        samples   <= samples + 1'b1;
        cnt       <= '0;
      end else if (active) begin
        if (cnt != '1) cnt <= cnt + 1'b1;
      end else if (send_valid) begin
        active <= 1'b1;
        tag_q  <= send_tag;
        cnt    <= CNT_W'(1);
      end
    end
  end

endmodule
