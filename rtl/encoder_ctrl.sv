// encoder_ctrl: frame controller of the encoder (three-stage macroblock
// pipeline: motion unit, texture coding, VLC).
//
// States follow the controller state diagram:
//   idle -> init_vlc_st -> I frame: i_text_en <-> i_text_vlc_en (N_MB loops)
//                                   -> dn_en -> finish_frame_st -> idle
//                       -> P frame: dn_en -> p_ME_text_en <-> p_text_vlc_en
//                                   -> finish_frame_st -> idle
// I frame: i_text_en starts texture coding of MB k; i_text_vlc_en starts VLC
// of MB k (which then runs in parallel with texture coding of MB k+1) and
// returns to i_text_en until all N_MB macroblocks have been textured; after
// the last VLC it moves to dn_en, where the reconstructed frame is
// downsampled for the next frame's motion estimation.
// P frame: dn_en first downsamples the current frame. Time slot j runs ME
// (followed by the MC fetch) of MB j, texture coding of MB j-1 and VLC of MB
// j-2. p_ME_text_en starts the three stages of the slot together;
// p_text_vlc_en waits until every started unit has finished. Slot 0 (ME only) is the self loop "finish 0th MB"; slots 1 ..
// N_MB-2 return to p_ME_text_en (N_MB-2 = 394 loops); the last two slots
// (no ME) stay in p_text_vlc_en ("finish the last two MB").
// finish_frame_st flushes the packer and then writes 0x03 to the DMAC status
// register (dmac_wr/dmac_data), which moves the bitstream out.
// The current/previous frame memories swap roles on every P frame except the
// first after an I frame (mem_sel: 0 = Mem1 holds the current frame).
// All *_start outputs are one-cycle pulses; *_done inputs are one-cycle
// pulses from the units.
//
// From the published design: the state names, the loop counts and the memory role
// switch. Own choices: all three stages start together in p_ME_text_en, and
// the MB position advances when the MC fetch ends.
module encoder_ctrl
  import mpeg4_pkg::*;
#(
  parameter int unsigned N_MB = 396,
  parameter int unsigned MB_W = 22
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_go,        // from the status register
  input  frame_type_e frame_type,
  output logic        frame_busy,
  output logic        frame_done,
  output logic        vlc_init,
  output logic        mem_sel,
  // downsampling
  output logic        dn_start,
  input  logic        dn_done,
  // motion unit
  output logic        me_start,
  output logic [4:0]  me_mb_x,
  output logic [4:0]  me_mb_y,
  input  logic        me_done,
  output logic        mc_start,
  input  logic        mc_done,
  output logic        mc_swap,
  // texture coding
  output logic        tex_start,
  output logic [8:0]  tex_mb,
  input  logic        tex_done,
  // VLC
  output logic        vlc_swap,
  output logic        vlc_start,
  output logic [8:0]  vlc_mb,
  input  logic        vlc_done,
  output logic        vlc_flush,
  input  logic        vlc_flush_done,
  // DMAC
  output logic        dmac_wr,
  output logic [7:0]  dmac_data,
  // state, for observation
  output logic [3:0]  state_o
);
  typedef enum logic [3:0] {
    IDLE, INIT_VLC, I_TEXT, I_TEXT_VLC, DN_EN, P_ME_TEXT, P_TEXT_VLC,
    FINISH, FINISH_WAIT
  } cstate_e;
  cstate_e st;
  assign state_o = st;

  frame_type_e ftype;
  logic [9:0] slot;          // slot / macroblock counter
  logic       first_p;       // next P frame is the first after an I frame
  logic       me_pend, mc_pend, tex_pend, vlc_pend, dn_pend;
  logic       all_idle;
  assign all_idle = !me_pend && !mc_pend && !tex_pend && !vlc_pend;

  // ME macroblock position for slot
  logic [4:0] mx;
  logic [4:0] my;

  assign frame_busy = (st != IDLE);
  assign dmac_data  = 8'h03;
  assign me_mb_x    = mx;
  assign me_mb_y    = my;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; ftype <= FRAME_I; slot <= '0; first_p <= 1'b1; mem_sel <= 1'b0;
      me_pend <= 1'b0; mc_pend <= 1'b0; tex_pend <= 1'b0; vlc_pend <= 1'b0; dn_pend <= 1'b0;
      mx <= '0; my <= '0; tex_mb <= '0; vlc_mb <= '0;
      vlc_init <= 1'b0; dn_start <= 1'b0; me_start <= 1'b0; mc_start <= 1'b0; mc_swap <= 1'b0;
      tex_start <= 1'b0; vlc_swap <= 1'b0; vlc_start <= 1'b0; vlc_flush <= 1'b0;
      dmac_wr <= 1'b0; frame_done <= 1'b0;
    end else begin
      vlc_init <= 1'b0; dn_start <= 1'b0; me_start <= 1'b0; mc_start <= 1'b0; mc_swap <= 1'b0;
      tex_start <= 1'b0; vlc_swap <= 1'b0; vlc_start <= 1'b0; vlc_flush <= 1'b0;
      dmac_wr <= 1'b0; frame_done <= 1'b0;
      // completion tracking; the MC fetch follows the ME of the same MB
      if (me_done) begin me_pend <= 1'b0; mc_start <= 1'b1; mc_pend <= 1'b1; end
      if (mc_done) begin
        // the ME/MC macroblock position moves on once the MC fetch is done
        mc_pend <= 1'b0;
        if (mx == 5'(MB_W - 1)) begin mx <= '0; my <= my + 5'd1; end
        else mx <= mx + 5'd1;
      end
      if (tex_done) tex_pend <= 1'b0;
      if (vlc_done) vlc_pend <= 1'b0;
      if (dn_done)  dn_pend  <= 1'b0;

      unique case (st)
        IDLE: if (frame_go) begin
          st <= INIT_VLC; ftype <= frame_type; vlc_init <= 1'b1;
          if (frame_type == FRAME_I) first_p <= 1'b1;
          else begin
            first_p <= 1'b0;
            if (!first_p) mem_sel <= ~mem_sel;
          end
          if (frame_type == FRAME_I) mem_sel <= 1'b0;
        end
        INIT_VLC: begin
          slot <= '0; mx <= '0; my <= '0;
          if (ftype == FRAME_I) st <= I_TEXT;
          else begin st <= DN_EN; dn_start <= 1'b1; dn_pend <= 1'b1; end
        end
        // ---------------- I frame ----------------
        I_TEXT: if (!tex_pend && !tex_start) begin
          tex_start <= 1'b1; tex_pend <= 1'b1; tex_mb <= 9'(slot);
          st <= I_TEXT_VLC;
        end
        I_TEXT_VLC: if (!tex_pend && !tex_start && !vlc_pend && !vlc_start) begin
          if (slot == 10'(N_MB)) begin
            // finish the last MB
            st <= DN_EN; dn_start <= 1'b1; dn_pend <= 1'b1;
          end else begin
            vlc_swap <= 1'b1; vlc_start <= 1'b1; vlc_pend <= 1'b1; vlc_mb <= 9'(slot);
            slot <= slot + 10'd1;
            if (slot != 10'(N_MB - 1)) st <= I_TEXT;
          end
        end
        DN_EN: if (!dn_pend && !dn_start) begin
          if (ftype == FRAME_I) begin st <= FINISH; vlc_flush <= 1'b1; end
          else st <= P_ME_TEXT;
        end
        // ---------------- P frame ----------------
        P_ME_TEXT: if (all_idle && !mc_start) begin
          // one time slot: ME (then MC) of MB slot, texture of MB slot-1 and
          // VLC of MB slot-2 start together, so the texture coder's writes
          // go to the coefficient bank the VLC has just released
          mc_swap <= 1'b1;
          if (slot < 10'(N_MB)) begin me_start <= 1'b1; me_pend <= 1'b1; end
          if (slot >= 10'd1 && slot <= 10'(N_MB)) begin
            tex_start <= 1'b1; tex_pend <= 1'b1; tex_mb <= 9'(slot - 10'd1);
          end
          if (slot >= 10'd2) begin
            vlc_swap <= 1'b1; vlc_start <= 1'b1; vlc_pend <= 1'b1; vlc_mb <= 9'(slot - 10'd2);
          end
          if (slot == 10'd0) slot <= 10'd1;      // finish 0th MB: stay
          else st <= P_TEXT_VLC;
        end
        P_TEXT_VLC: if (all_idle && !mc_start && !vlc_start && !tex_start && !me_start) begin
          slot <= slot + 10'd1;
          if (slot == 10'(N_MB + 1)) begin st <= FINISH; vlc_flush <= 1'b1; end
          else if (slot >= 10'(N_MB - 1)) begin
            // finish the last two MB: texture N-1 with VLC N-2, then VLC N-1
            mc_swap <= 1'b1;
            if (slot == 10'(N_MB - 1)) begin
              tex_start <= 1'b1; tex_pend <= 1'b1; tex_mb <= 9'(N_MB - 1);
            end
            vlc_swap <= 1'b1; vlc_start <= 1'b1; vlc_pend <= 1'b1; vlc_mb <= 9'(slot - 10'd1);
          end else st <= P_ME_TEXT;
        end
        FINISH: if (vlc_flush_done) begin st <= FINISH_WAIT; dmac_wr <= 1'b1; end
        FINISH_WAIT: begin st <= IDLE; frame_done <= 1'b1; end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
