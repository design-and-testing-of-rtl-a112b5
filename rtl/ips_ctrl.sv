// ips_ctrl: digital control of the Intelligent Power Switch (lamp driver).
//
// The analog part of the switch (power MOS, current limitation loop,
// comparators, temperature sensor) is outside this block; it reports the
// comparator outputs OVER_CURR, OVER_TEMP, KID (key ignition detection) and
// LID (lamp ignition detection). This block decides when the power MOS gate
// is driven:
//  * lamp_ctrl high switches the load on (gate_on = 1).
//  * Over-current protection: if OVER_CURR stays high for oc_time
//    consecutive ticks, the soft start takes over. It switches the driver off
//    for t_off ticks and on for t_on ticks, repeating while the
//    over-current is still present at the end of an on-pulse. It returns to
//    the steady on state at the end of an on-pulse without over-current.
//  * Over-temperature protection: while OVER_TEMP is high the driver is
//    forced off (ot_shutdown = 1). It restarts when the comparator releases,
//    the comparator's hysteresis setting the cooling time.
//  * Diagnosis from KID/LID: diag = 0 key off (KID=0, LID=0), 1 key on with
//    the switch off (KID=1, LID=1), 2 key on with the switch on and the lamp
//    lit (KID=1, LID=0), 3 fault (KID=0, LID=1). lamp_fault is diag == 3 or
//    a command to switch on without the lamp lit (diag != 2) after the
//    soft start has ended.
//
// Timing: one clock, all comparator inputs pass two synchronising flops.
// tick is a one-clock time-base strobe (for example 1 ms); oc_time, t_on and
// t_off are counted in ticks and are configuration inputs (the document
// calls them configurable, e.g. 25 ms / 25 ms, 15 ms / 15 ms, 80 ms / 8 ms).
// A value of 0 behaves as 1.
module ips_ctrl #(
  parameter int CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          lamp_ctrl,
  input  logic          over_curr,
  input  logic          over_temp,
  input  logic          kid,
  input  logic          lid,
  input  logic [CW-1:0] oc_time,
  input  logic [CW-1:0] t_on,
  input  logic [CW-1:0] t_off,
  output logic          gate_on,
  output logic          soft_start,
  output logic          ot_shutdown,
  output logic [1:0]    diag,
  output logic          lamp_fault
);
  typedef enum logic [1:0] {S_OFF, S_ON, S_SS_OFF, S_SS_ON} st_e;
  st_e st;
  logic [CW-1:0] cnt;
  logic [1:0] s_oc, s_ot, s_kid, s_lid;
  logic oc, ot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_oc <= '0; s_ot <= '0; s_kid <= '0; s_lid <= '0;
    end else begin
      s_oc <= {s_oc[0], over_curr}; s_ot <= {s_ot[0], over_temp};
      s_kid <= {s_kid[0], kid};     s_lid <= {s_lid[0], lid};
    end
  end
  assign oc = s_oc[1];
  assign ot = s_ot[1];

  function automatic logic [CW-1:0] atleast1(input logic [CW-1:0] v);
    return (v == '0) ? CW'(1) : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_OFF; cnt <= '0;
    end else if (!lamp_ctrl) begin
      st <= S_OFF; cnt <= '0;
    end else begin
      unique case (st)
        S_OFF: begin st <= S_ON; cnt <= '0; end
        S_ON: begin
          if (!oc) cnt <= '0;
          else if (tick) begin
            if (cnt + CW'(1) >= atleast1(oc_time)) begin st <= S_SS_OFF; cnt <= '0; end
            else cnt <= cnt + CW'(1);
          end
        end
        S_SS_OFF: if (tick) begin
          if (cnt + CW'(1) >= atleast1(t_off)) begin st <= S_SS_ON; cnt <= '0; end
          else cnt <= cnt + CW'(1);
        end
        S_SS_ON: if (tick) begin
          if (cnt + CW'(1) >= atleast1(t_on)) begin
            st <= oc ? S_SS_OFF : S_ON; cnt <= '0;
          end else cnt <= cnt + CW'(1);
        end
      endcase
    end
  end

  assign ot_shutdown = lamp_ctrl && ot;
  assign soft_start  = (st == S_SS_OFF) || (st == S_SS_ON);
  assign gate_on     = ((st == S_ON) || (st == S_SS_ON)) && !ot;

  always_comb begin
    unique case ({s_kid[1], s_lid[1]})
      2'b00: diag = 2'd0;
      2'b11: diag = 2'd1;
      2'b10: diag = 2'd2;
      default: diag = 2'd3;
    endcase
  end
  assign lamp_fault = (diag == 2'd3) || (st == S_ON && !ot && s_kid[1] && diag != 2'd2);
endmodule
