// Supply sequencer of the ROD motherboard (the CPLD behind PENA, PENB and
// PENC).
//
// Power is switched on only while the RCC enables it and both backplane
// voltages, 5 V and 3.3 V, are valid. The three switched supplies are then
// enabled one after another: PENA (DSP_VA, the 1.5 V DSP supply from a
// DC-DC converter, reported good by VAOK), PENB (VB, 2.5 V, VBOK) and PENC
// (DSP_VCC, 3.3 V, VCOK). Each step waits for the previous supply's good
// signal, for at most TIMEOUT_CYCLES. The VB input switch is made of 3+2
// switches in parallel; the two extra ones (penb_surge) carry the initial
// current surge and are turned off SURGE_CYCLES after PENB rises. If a
// good signal does not come in time or drops later, or a backplane
// voltage fails, every supply is switched off at once and fault is set;
// fault clears when the RCC withdraws the enable. MB_VCC and MB_VCC5, which
// feed the VME interface, are not switched by this logic.
//
// From the document: the three enables and good signals, the backplane
// condition, the RCC enable and the surge switches. The order A, B, C, the
// wait-for-good stepping, the timeout and the shutdown rule are this
// design's choices: the document says only that the supplies are
// sequenced. Timing: one state step per clock of the CPLD.
module power_sequencer #(
  parameter int unsigned TIMEOUT_CYCLES = 400_000,   // 10 ms at 40 MHz
  parameter int unsigned SURGE_CYCLES   = 40_000     // 1 ms at 40 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rcc_power_en,
  input  logic bp5_ok,        // backplane 5.0 V valid
  input  logic bp33_ok,       // backplane 3.3 V valid
  input  logic vaok,
  input  logic vbok,
  input  logic vcok,
  output logic pena,
  output logic penb,
  output logic penb_surge,
  output logic penc,
  output logic power_good,
  output logic fault
);
  typedef enum logic [2:0] {S_OFF, S_A, S_B, S_C, S_ON, S_FAULT} state_e;
  state_e state;
  logic [$clog2(TIMEOUT_CYCLES+1)-1:0] timer;
  logic [$clog2(SURGE_CYCLES+1)-1:0]   surge_timer;
  logic bp_ok;
  assign bp_ok = bp5_ok && bp33_ok;

  assign pena       = (state == S_A) || (state == S_B) || (state == S_C) || (state == S_ON);
  assign penb       = (state == S_B) || (state == S_C) || (state == S_ON);
  assign penc       = (state == S_C) || (state == S_ON);
  assign penb_surge = penb && (surge_timer != 0);
  assign power_good = (state == S_ON);
  assign fault      = (state == S_FAULT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_OFF;
      timer       <= '0;
      surge_timer <= '0;
    end else begin
      if (surge_timer != 0) surge_timer <= surge_timer - 1'b1;
      unique case (state)
        S_OFF: if (rcc_power_en && bp_ok) begin
          state <= S_A;
          timer <= '0;
        end
        S_A: begin
          timer <= timer + 1'b1;
          if (!rcc_power_en)                  state <= S_OFF;
          else if (!bp_ok)                    state <= S_FAULT;
          else if (vaok) begin
            state       <= S_B;
            timer       <= '0;
            surge_timer <= ($bits(surge_timer))'(SURGE_CYCLES);
          end
          else if (timer == ($bits(timer))'(TIMEOUT_CYCLES)) state <= S_FAULT;
        end
        S_B: begin
          timer <= timer + 1'b1;
          if (!rcc_power_en)                  state <= S_OFF;
          else if (!bp_ok || !vaok)           state <= S_FAULT;
          else if (vbok) begin
            state <= S_C;
            timer <= '0;
          end
          else if (timer == ($bits(timer))'(TIMEOUT_CYCLES)) state <= S_FAULT;
        end
        S_C: begin
          timer <= timer + 1'b1;
          if (!rcc_power_en)                  state <= S_OFF;
          else if (!bp_ok || !vaok || !vbok)  state <= S_FAULT;
          else if (vcok)                      state <= S_ON;
          else if (timer == ($bits(timer))'(TIMEOUT_CYCLES)) state <= S_FAULT;
        end
        S_ON: begin
          if (!rcc_power_en)                         state <= S_OFF;
          else if (!bp_ok || !vaok || !vbok || !vcok) state <= S_FAULT;
        end
        S_FAULT: if (!rcc_power_en) state <= S_OFF;
        default: state <= S_OFF;
      endcase
      if (state == S_OFF || state == S_FAULT) surge_timer <= '0;
    end
  end
endmodule
