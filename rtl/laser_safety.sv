// Laser-safety and link-lock supervisor of the transition module (TM).
//
// The TM switches off all of its optical transmitters when the rack-door
// interlock signal is absent or when the data links lose lock too often.
// Each of the N_LINKS receivers reports its lock state; every transition
// from locked to unlocked counts as one loss-of-lock event. When more than
// MAX_LOSSES events fall into one window of WINDOW_CYCLES clocks, the
// transmitters are disabled and stay disabled (tx_disable, latched) until
// clear is pulsed with the interlock present. While a link is unlocked,
// fill_req asks the link's control transmitter to send fill frames, which
// helps the receiver re-establish lock (per ASM, as the document says).
//
// From the document: both disable causes, the per-TM scope of the disable
// and the per-ASM fill frames. The counting window, the threshold and the
// clear input are this design's choices (the document says only
// "excessive loss of lock"). Timing: tx_disable rises in the clock after
// the cause; fill_req follows lock with one clock of delay.
module laser_safety #(
  parameter int unsigned N_LINKS       = 10,        // data fibres in use: 2 chambers x 5 ASMs
  parameter int unsigned WINDOW_CYCLES = 40_000_000, // 1 s at 40 MHz
  parameter int unsigned MAX_LOSSES    = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               interlock,       // rack-door interlock present
  input  logic [N_LINKS-1:0] lock,
  input  logic               clear,
  output logic               tx_disable,
  output logic [N_LINKS-1:0] fill_req,
  output logic [15:0]        losses_in_window,
  output logic [31:0]        total_losses
);
  logic [N_LINKS-1:0] lock_q;
  logic [$clog2(WINDOW_CYCLES)-1:0] wtimer;
  logic [$clog2(N_LINKS+1)-1:0]     new_losses;

  always_comb begin
    new_losses = '0;
    for (int i = 0; i < int'(N_LINKS); i++)
      new_losses += ($bits(new_losses))'(lock_q[i] && !lock[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q           <= '0;
      fill_req         <= '0;
      wtimer           <= '0;
      losses_in_window <= '0;
      total_losses     <= '0;
      tx_disable       <= 1'b1;   // off until the interlock has been seen
    end else begin
      lock_q       <= lock;
      fill_req     <= ~lock;
      total_losses <= total_losses + 32'(new_losses);
      if (wtimer == ($bits(wtimer))'(WINDOW_CYCLES - 1)) begin
        wtimer           <= '0;
        losses_in_window <= 16'(new_losses);
      end else begin
        wtimer           <= wtimer + 1'b1;
        losses_in_window <= losses_in_window + 16'(new_losses);
      end

      if (!interlock || (32'(losses_in_window) + 32'(new_losses) > MAX_LOSSES))
        tx_disable <= 1'b1;
      else if (clear)
        tx_disable <= 1'b0;
    end
  end
endmodule
