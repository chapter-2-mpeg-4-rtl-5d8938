// scan_remap: read-address remapping of the VLC coefficient buffer.
//
// The texture coder writes each 8x8 block in raster order (address
// 8*row + column). The run length coder reads scan positions 0..63; this
// combinational block turns a scan position into the raster address for the
// zigzag, alternate-horizontal or alternate-vertical scan. Only the zigzag and
// alternate-horizontal orders are tabulated (the standard MPEG-4 scan tables);
// the alternate-vertical order is the transpose of the alternate-horizontal
// one, so its address is the alternate-horizontal address with the high three
// bits (row) and low three bits (column) exchanged.
//
// From the published design: the scan tables and the bit exchange for
// alternate-vertical.
module scan_remap
  import mpeg4_pkg::*;
(
  input  scan_e      scan,
  input  logic [5:0] pos,
  output logic [5:0] addr
);
  logic [5:0] zz_addr, ah_addr;

  always_comb begin : zigzag
    logic [5:0] raster;
    unique case (pos)
      6'd0: raster = 6'd0;
      6'd1: raster = 6'd1;
      6'd2: raster = 6'd8;
      6'd3: raster = 6'd16;
      6'd4: raster = 6'd9;
      6'd5: raster = 6'd2;
      6'd6: raster = 6'd3;
      6'd7: raster = 6'd10;
      6'd8: raster = 6'd17;
      6'd9: raster = 6'd24;
      6'd10: raster = 6'd32;
      6'd11: raster = 6'd25;
      6'd12: raster = 6'd18;
      6'd13: raster = 6'd11;
      6'd14: raster = 6'd4;
      6'd15: raster = 6'd5;
      6'd16: raster = 6'd12;
      6'd17: raster = 6'd19;
      6'd18: raster = 6'd26;
      6'd19: raster = 6'd33;
      6'd20: raster = 6'd40;
      6'd21: raster = 6'd48;
      6'd22: raster = 6'd41;
      6'd23: raster = 6'd34;
      6'd24: raster = 6'd27;
      6'd25: raster = 6'd20;
      6'd26: raster = 6'd13;
      6'd27: raster = 6'd6;
      6'd28: raster = 6'd7;
      6'd29: raster = 6'd14;
      6'd30: raster = 6'd21;
      6'd31: raster = 6'd28;
      6'd32: raster = 6'd35;
      6'd33: raster = 6'd42;
      6'd34: raster = 6'd49;
      6'd35: raster = 6'd56;
      6'd36: raster = 6'd57;
      6'd37: raster = 6'd50;
      6'd38: raster = 6'd43;
      6'd39: raster = 6'd36;
      6'd40: raster = 6'd29;
      6'd41: raster = 6'd22;
      6'd42: raster = 6'd15;
      6'd43: raster = 6'd23;
      6'd44: raster = 6'd30;
      6'd45: raster = 6'd37;
      6'd46: raster = 6'd44;
      6'd47: raster = 6'd51;
      6'd48: raster = 6'd58;
      6'd49: raster = 6'd59;
      6'd50: raster = 6'd52;
      6'd51: raster = 6'd45;
      6'd52: raster = 6'd38;
      6'd53: raster = 6'd31;
      6'd54: raster = 6'd39;
      6'd55: raster = 6'd46;
      6'd56: raster = 6'd53;
      6'd57: raster = 6'd60;
      6'd58: raster = 6'd61;
      6'd59: raster = 6'd54;
      6'd60: raster = 6'd47;
      6'd61: raster = 6'd55;
      6'd62: raster = 6'd62;
      6'd63: raster = 6'd63;
      default: raster = 6'd0;
    endcase
    zz_addr = raster;
  end

  always_comb begin : alt_horizontal
    logic [5:0] raster;
    unique case (pos)
      6'd0: raster = 6'd0;
      6'd1: raster = 6'd1;
      6'd2: raster = 6'd2;
      6'd3: raster = 6'd3;
      6'd4: raster = 6'd8;
      6'd5: raster = 6'd9;
      6'd6: raster = 6'd16;
      6'd7: raster = 6'd17;
      6'd8: raster = 6'd10;
      6'd9: raster = 6'd11;
      6'd10: raster = 6'd4;
      6'd11: raster = 6'd5;
      6'd12: raster = 6'd6;
      6'd13: raster = 6'd7;
      6'd14: raster = 6'd15;
      6'd15: raster = 6'd14;
      6'd16: raster = 6'd13;
      6'd17: raster = 6'd12;
      6'd18: raster = 6'd19;
      6'd19: raster = 6'd18;
      6'd20: raster = 6'd24;
      6'd21: raster = 6'd25;
      6'd22: raster = 6'd32;
      6'd23: raster = 6'd33;
      6'd24: raster = 6'd26;
      6'd25: raster = 6'd27;
      6'd26: raster = 6'd20;
      6'd27: raster = 6'd21;
      6'd28: raster = 6'd22;
      6'd29: raster = 6'd23;
      6'd30: raster = 6'd28;
      6'd31: raster = 6'd29;
      6'd32: raster = 6'd30;
      6'd33: raster = 6'd31;
      6'd34: raster = 6'd34;
      6'd35: raster = 6'd35;
      6'd36: raster = 6'd40;
      6'd37: raster = 6'd41;
      6'd38: raster = 6'd48;
      6'd39: raster = 6'd49;
      6'd40: raster = 6'd42;
      6'd41: raster = 6'd43;
      6'd42: raster = 6'd36;
      6'd43: raster = 6'd37;
      6'd44: raster = 6'd38;
      6'd45: raster = 6'd39;
      6'd46: raster = 6'd44;
      6'd47: raster = 6'd45;
      6'd48: raster = 6'd46;
      6'd49: raster = 6'd47;
      6'd50: raster = 6'd50;
      6'd51: raster = 6'd51;
      6'd52: raster = 6'd56;
      6'd53: raster = 6'd57;
      6'd54: raster = 6'd58;
      6'd55: raster = 6'd59;
      6'd56: raster = 6'd52;
      6'd57: raster = 6'd53;
      6'd58: raster = 6'd54;
      6'd59: raster = 6'd55;
      6'd60: raster = 6'd60;
      6'd61: raster = 6'd61;
      6'd62: raster = 6'd62;
      6'd63: raster = 6'd63;
      default: raster = 6'd0;
    endcase
    ah_addr = raster;
  end

  always_comb begin
    unique case (scan)
      SCAN_ALT_H: addr = ah_addr;
      SCAN_ALT_V: addr = {ah_addr[2:0], ah_addr[5:3]};
      default:    addr = zz_addr;
    endcase
  end
endmodule
