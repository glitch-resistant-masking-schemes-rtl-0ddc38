// present_sbox_ti: pipelined three-share threshold implementation of the
// 4-bit PRESENT S-box.
//
// Stage F (present_ti_f) feeds a share register, stage G (present_ti_g)
// feeds the output share register. The register between the two quadratic
// stages is what keeps glitches of F from reaching G: each register stage
// of a TI must stand between non-complete functions. The XOR of y_sh is
// S(XOR of x_sh).
//
// Timing: x_sh is taken with in_valid; y_sh is valid with out_valid two
// clock edges later. One new input per cycle. The paper only says the
// design is pipelined over two stages; the valid flags are this design's
// own choice.
module present_sbox_ti
  import ti_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  present_sh_t x_sh,
  output logic        out_valid,
  output present_sh_t y_sh
);

  present_sh_t f_d, f_q, g_d;
  logic        v1_q;

  present_ti_f u_f (.x_sh(x_sh), .y_sh(f_d));
  present_ti_g u_g (.x_sh(f_q),  .y_sh(g_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) f_q  <= f_d;
    if (v1_q)     y_sh <= g_d;
  end

endmodule
