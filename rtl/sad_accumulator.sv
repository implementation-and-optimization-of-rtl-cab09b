// sad_accumulator: running SAD of one prediction mode.
//
// Cleared by `clear`; on every cycle with `acc_en` it adds |orig - pred|
// (from sad_abs_diff) to the sum. One pixel per clock, so a block of N*N
// pixels takes N*N enabled cycles. `sad` is the registered sum.
module sad_accumulator #(
  parameter int SADW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            acc_en,
  input  logic [7:0]      orig,
  input  logic [7:0]      pred,
  output logic [SADW-1:0] sad
);
  logic [7:0] d;

  sad_abs_diff u_abs (.c_pix(orig), .r_pix(pred), .abs_diff(d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sad <= '0;
    else if (clear)  sad <= '0;
    else if (acc_en) sad <= sad + SADW'(d);
  end
endmodule
