// readout_mux -- read-out of a DW-bit ciphertext register in BW-bit chunks.
//
// On a start strobe the chunk selected by addr (0 = bits BW-1:0) is copied
// into the rd register; a 128-bit ciphertext takes four reads. rd holds its
// value between reads. Latency: rd shows the chunk one clock after start.
// The chunk order, the registered output and its reset value 0 are this
// design's choices.
module readout_mux #(
  parameter int unsigned DW = 128,
  parameter int unsigned BW = 32,
  localparam int unsigned AW = (DW / BW > 1) ? $clog2(DW / BW) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] ct,
  output logic [BW-1:0] rd
);

  logic [BW-1:0] chunk [DW/BW];

  for (genvar c = 0; c < DW / BW; c++) begin : g_chunk
    assign chunk[c] = ct[c*BW +: BW];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd <= '0;
    else if (start) rd <= chunk[addr];
  end

endmodule
