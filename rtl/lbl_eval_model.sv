`timescale 1ps/1ps
// lbl_eval_model -- behavioural model of the read-evaluate timing of one pair
// of local bitlines (LBLs) merged by a 2-input NAND (output NAOUT).
//
// The logic value of the read comes from the bitcell array (`lbl_hit`: one of
// the two LBLs is being pulled low by the selected cell). How long the
// discharge takes is an analog property of the cell, the bitline and the
// supply; this model stands for it with `eval_delay_ps`, which a testbench
// varies to mimic voltage droop, temperature, ageing or slow cells.
//
// Timing rules:
//  * NAOUT rises `eval_delay_ps` after `lbl_hit` rises, provided neither the
//    equalizer (`eq_en`, EQ1) nor the bitline precharge (`pch_en`, P1) has
//    turned on by then. An evaluation that arrives later is lost: the bitline
//    is restored before it could flip the NAND.
//  * NAOUT falls when the precharge `pch_en` turns on.
// The rules follow the described conditional, delayed bitline precharge; the
// single lumped delay is this model's simplification.
module lbl_eval_model (
  input  logic        lbl_hit,
  input  logic        eq_en,
  input  logic        pch_en,
  input  int unsigned eval_delay_ps,
  output logic        naout
);

  initial naout = 1'b0;

  // Each rising edge of the word-line hit starts its own evaluation, so an
  // evaluate delay longer than the word-line pulse is still honoured.
  always @(posedge lbl_hit) begin
    fork
      begin
        #(eval_delay_ps);
        if (!pch_en && !eq_en) naout = 1'b1;
      end
    join_none
  end

  always @(posedge pch_en) naout = 1'b0;

endmodule
