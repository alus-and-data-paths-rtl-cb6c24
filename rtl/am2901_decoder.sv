// am2901_decoder - instruction decoder of the 4-bit ALU slice.
//
// Purely combinational. It turns the three instruction fields into the
// selects of the two source multiplexers, the ALU function, the write
// enables of the register set and the Q register, the modes of the RAM and
// Q shifters and the select of the Y output multiplexer. The mapping is the
// one of the source, function and destination tables; how it is expressed
// as a control struct is this design's own choice.
module am2901_decoder
  import am2901_pkg::*;
(
  input  instr_t instr,
  output ctrl_t  ctrl
);

  always_comb begin
    ctrl = '0;
    // source field
    unique case (instr.src)
      SRC_AQ: begin ctrl.r_is_a = 1'b1; ctrl.s_sel = S_Q; end
      SRC_AB: begin ctrl.r_is_a = 1'b1; ctrl.s_sel = S_B; end
      SRC_ZQ: ctrl.s_sel = S_Q;
      SRC_ZB: ctrl.s_sel = S_B;
      SRC_ZA: ctrl.s_sel = S_A;
      SRC_DA: begin ctrl.r_is_d = 1'b1; ctrl.s_sel = S_A; end
      SRC_DQ: begin ctrl.r_is_d = 1'b1; ctrl.s_sel = S_Q; end
      SRC_DZ: begin ctrl.r_is_d = 1'b1; ctrl.s_sel = S_Z; end
    endcase
    ctrl.fn = instr.fn;
    // destination field
    ctrl.ram_shift = SH_PASS;
    ctrl.q_shift   = SH_PASS;
    unique case (instr.dst)
      DST_QREG:  ctrl.q_we = 1'b1;
      DST_NOP:   ;
      DST_RAMA:  begin ctrl.ram_we = 1'b1; ctrl.y_is_a = 1'b1; end
      DST_RAMF:  ctrl.ram_we = 1'b1;
      DST_RAMQD: begin
        ctrl.ram_we = 1'b1; ctrl.ram_shift = SH_DOWN;
        ctrl.q_we   = 1'b1; ctrl.q_shift   = SH_DOWN;
      end
      DST_RAMD:  begin ctrl.ram_we = 1'b1; ctrl.ram_shift = SH_DOWN; end
      DST_RAMQU: begin
        ctrl.ram_we = 1'b1; ctrl.ram_shift = SH_UP;
        ctrl.q_we   = 1'b1; ctrl.q_shift   = SH_UP;
      end
      DST_RAMU:  begin ctrl.ram_we = 1'b1; ctrl.ram_shift = SH_UP; end
    endcase
  end

endmodule
