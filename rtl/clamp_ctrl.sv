// clamp_ctrl: digital timing of the input clamp.
//
// The clamp is applied for clamp_len samples starting clamp_pos samples
// after each horizontal sync (hs). A small position places it on the sync
// tip, a larger one on the back porch; ref_sel picks which of the two
// analog clamp reference levels is used and is passed, registered, to the
// analog clamp with the pulse. Programmable position, duration and the
// choice of one of two references follow the document; counting from the
// sync separator's hs pulse is this design's.
// Timing: if hs is high in clock t, clamp is high in clocks t+1+m for
// clamp_pos <= m < clamp_pos + clamp_len (clamp is decoded from registers).
module clamp_ctrl #(
  parameter int HW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          hs,
  input  logic [HW-1:0] clamp_pos,
  input  logic [HW-1:0] clamp_len,
  input  logic          ref_sel,
  output logic          clamp,
  output logic          clamp_ref
);
  logic [HW-1:0] cnt;
  logic          run;
  logic [HW:0]   stop;

  assign stop  = {1'b0, clamp_pos} + {1'b0, clamp_len};
  assign clamp = run && !hs && cnt >= clamp_pos && {1'b0, cnt} < stop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      run       <= 1'b0;
      clamp_ref <= 1'b0;
    end else begin
      clamp_ref <= ref_sel;
      if (hs) begin
        cnt <= '0;
        run <= en;
      end else if (run && cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
