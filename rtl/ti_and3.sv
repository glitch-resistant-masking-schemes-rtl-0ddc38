// ti_and3: first-order threshold implementation of a 2-input AND gate with
// three shares, in the general TI structure: input share registers, three
// independent component functions, output share registers.
//
// Component function f1 sees shares 1 and 2 of x and y, f2 shares 2 and 3,
// f3 shares 3 and 1 (ti_and_component). No combinational cloud ever sees all
// three shares of an input, which is what makes the circuit resistant to
// glitch-based power analysis and, by the same argument, to fault
// sensitivity analysis: the critical path delay of each cloud depends on two
// shares only. The XOR of z_sh equals (XOR of x_sh) AND (XOR of y_sh).
//
// Timing: x_sh/y_sh are captured on the clock edge where in_valid is high,
// the result appears in z_sh with out_valid one clock later (latency 2 edges
// from the inputs at the port, one result per cycle). The input register
// keeps its value while in_valid is low, so a transition from any chosen
// previous value ("reset value") into the clouds can be produced. Registers
// on both sides follow the usual TI drawing; the valid flag and the reset of
// the valid flags are this design's own choice.
module ti_and3
  import ti_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [NUM_SHARES-1:0] x_sh,     // bit j = share j+1 of x
  input  logic [NUM_SHARES-1:0] y_sh,     // bit j = share j+1 of y
  output logic                  out_valid,
  output logic [NUM_SHARES-1:0] z_sh      // bit j = share j+1 of x AND y
);

  logic [NUM_SHARES-1:0] x_q, y_q, z_d;
  logic                  v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x_q <= x_sh;
      y_q <= y_sh;
    end
    if (v_q) z_sh <= z_d;
  end

  for (genvar j = 0; j < NUM_SHARES; j++) begin : g_comp
    localparam int unsigned K = (j + 1) % NUM_SHARES;
    ti_and_component u_f (
      .xa(x_q[j]), .xb(x_q[K]),
      .ya(y_q[j]), .yb(y_q[K]),
      .z (z_d[j])
    );
  end

endmodule
