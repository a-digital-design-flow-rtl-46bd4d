// time_ctrl: the DIG-IF sample time counter ti.
//
// ti counts sample periods: it advances by one on every cycle in which tick
// is high (one tick per output sample, i.e. every DECIM clock cycles at the
// top level). A SET_TI request (set_valid with tis) arms a shift: on the
// tick at which ti equals tis, ti wraps to 0 instead of advancing. Only one
// shift can be armed; a new SET_TI replaces an armed one. This follows the
// rule "set ti to 0 when ti equals tis" of the request list; the amount and
// direction of the resulting jump is thereby chosen by the baseband.
//
// Timing: ti is a register; it changes on the clock edge of a tick cycle.
// Reset (synchronous, active low) clears ti and the armed shift.
module time_ctrl #(
  parameter int unsigned TS_W = digif_pkg::TS_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic            set_valid,
  input  logic [TS_W-1:0] tis,
  output logic [TS_W-1:0] ti
);
  logic            armed;
  logic [TS_W-1:0] tis_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ti      <= '0;
      armed   <= 1'b0;
      tis_q   <= '0;
    end else begin
      if (tick) begin
        if (armed && ti == tis_q) begin
          ti      <= '0;
          armed   <= 1'b0;
        end else begin
          ti <= ti + 1'b1;
        end
      end
      if (set_valid) begin
        armed <= 1'b1;
        tis_q <= tis;
      end
    end
  end
endmodule
