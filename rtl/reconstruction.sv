// reconstruction: rebuilds Wyner-Ziv pixels by adding the decoded
// pixel-domain residue to the motion-compensated key-frame pixel.
//
// The 16 residues of one 4x4 block are loaded into registers at once (load).
// Motion-compensated pixels then arrive one per cycle (mc_valid) in
// row-major order of the block; a control counter selects the matching
// residue for the adder, and the sum, clipped to 0..255, leaves as the
// reconstructed pixel one cycle later. After 16 pixels the counter wraps
// and the next block's residues may be loaded. A load in the same cycle as
// a pixel is not allowed. Register bank, selection control and adder follow
// the described hardware; the clipping and the load protocol are this
// design's own.
module reconstruction (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic signed [15:0] residue [16],
  input  logic               mc_valid,
  input  logic [7:0]         mc_pixel,
  output logic               out_valid,
  output logic [7:0]         rec_pixel,
  output logic [3:0]         out_index      // position of rec_pixel in block
);
  logic signed [15:0] res_q [16];
  logic [3:0]         idx;
  logic signed [16:0] sum;

  assign sum = 17'(signed'({1'b0, mc_pixel})) + 17'(res_q[idx]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      out_valid <= 1'b0;
      rec_pixel <= '0;
      out_index <= '0;
      for (int k = 0; k < 16; k++) res_q[k] <= '0;
    end else begin
      out_valid <= mc_valid;
      if (load) begin
        res_q <= residue;
        idx   <= '0;
      end else if (mc_valid) begin
        idx       <= idx + 1'b1;
        out_index <= idx;
        rec_pixel <= (sum < 0) ? 8'd0 : (sum > 17'sd255) ? 8'd255 : 8'(sum);
      end
    end
  end
endmodule
