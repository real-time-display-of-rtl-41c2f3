// Execution-time counter shown on screen as days, hours, minutes and seconds.
//
// Each i_tick (end of a distribution phase, one millisecond of emulated time) advances a
// millisecond counter 0..999; its wrap advances the seconds. Seconds, minutes, hours and days are
// kept as two-digit arrays, digit 0 on the right, each digit 0..9 or 4'hF for a blank leading
// zero; every unit starts at {blank, 0}. A unit wraps back to {blank, 0} after 59 (seconds,
// minutes), 23 (hours) or 63 (days), carrying into the next unit. Units below days wrap silently
// at their maximum. Registered outputs, updated on the clock after i_tick.
module exec_time_counter #(
  parameter int MS_PER_S = 1000
) (
  input  logic            i_clk,
  input  logic            i_rst,
  input  logic            i_tick,
  output logic [1:0][3:0] o_sec,
  output logic [1:0][3:0] o_min,
  output logic [1:0][3:0] o_hour,
  output logic [1:0][3:0] o_day
);
  localparam logic [3:0] BLANK = 4'hF;
  localparam logic [1:0][3:0] ZERO = {BLANK, 4'd0};

  logic [9:0] ms;

  function automatic logic [1:0][3:0] next_val(logic [1:0][3:0] d);
    logic [1:0][3:0] n;
    n = d;
    if (d[0] == 4'd9) begin
      n[0] = 4'd0;
      n[1] = (d[1] == BLANK) ? 4'd1 : d[1] + 4'd1;
    end else begin
      n[0] = d[0] + 4'd1;
    end
    return n;
  endfunction

  function automatic logic at_max(logic [1:0][3:0] d, logic [3:0] tens, logic [3:0] units);
    return (d[1] == tens) && (d[0] == units);
  endfunction

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      ms     <= '0;
      o_sec  <= ZERO;
      o_min  <= ZERO;
      o_hour <= ZERO;
      o_day  <= ZERO;
    end else if (i_tick) begin
      if (ms == 10'(MS_PER_S - 1)) begin
        ms <= '0;
        if (at_max(o_sec, 4'd5, 4'd9)) begin
          o_sec <= ZERO;
          if (at_max(o_min, 4'd5, 4'd9)) begin
            o_min <= ZERO;
            if (at_max(o_hour, 4'd2, 4'd3)) begin
              o_hour <= ZERO;
              o_day  <= at_max(o_day, 4'd6, 4'd3) ? ZERO : next_val(o_day);
            end else o_hour <= next_val(o_hour);
          end else o_min <= next_val(o_min);
        end else o_sec <= next_val(o_sec);
      end else begin
        ms <= ms + 1'b1;
      end
    end
  end

endmodule
