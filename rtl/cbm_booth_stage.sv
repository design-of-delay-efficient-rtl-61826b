// One Booth iteration as combinational logic (a stage of cbm_comb).
//
// PA = {accumulator (W+1 bits), multiplier (W bits), extra LSB}. When `en`
// is high the stage recodes PA[1:0] (01: add the multiplicand, 10: subtract
// it, 00/11: nothing) into the accumulator half through cbm_alu and then
// shifts the whole of PA right by one place, repeating the sign bit. When
// `en` is low the stage passes PA on unchanged and its adder input is held
// at "no operation", so stages beyond the operands' range do no work.
//
// The recoding and the single arithmetic shift are the paper's; the
// enable that bypasses unused stages is this design's realisation of its
// "suppressing the most significant bits" idea in combinational form.
module cbm_booth_stage
  import cbm_pkg::*;
#(
  parameter int W  = cbm_pkg::CBM_W,
  parameter int PW = 2 * W + 2
) (
  input  logic          en,
  input  logic [PW-1:0] pa_in,
  input  logic [W-1:0]  m,        // multiplicand
  output logic [PW-1:0] pa_out
);

  localparam int AW = PW - W - 1;

  alu_op_e       op;
  logic [AW-1:0] acc_sum;
  logic [PW-1:0] pa_sum;

  assign op = en ? booth_decode(pa_in[1:0]) : ALU_NONE;

  cbm_alu #(.W(W), .AW(AW)) u_alu (
    .acc(pa_in[PW-1 -: AW]), .m, .op, .result(acc_sum)
  );

  always_comb begin
    pa_sum = {acc_sum, pa_in[W:0]};
    pa_out = en ? {pa_sum[PW-1], pa_sum[PW-1:1]} : pa_in;
  end

endmodule
