// sic_c_ucode_pkg: the microprogram of the microprogrammed SIC, as a
// function from ROM address to 48-bit microword (unused words are zero).
//
// Assembled from a symbolic microprogram (routine names in the README).  Microword
// fields: next address 47:39, condition 38:27 (A select 2:0, B select 7:3,
// invert 8), A source 23:21, B source 20:18, O destination 17:12, ALU
// function 11:9, control strobes 8:0 (A strobe 3:0, B strobe 7:4).
// Routines: instruction fetch at 0, address types, memory-reference
// instructions, the three OPERATE event times, unbuffered I/O (OD, ID, IS,
// command-only, input buffer direction), interrupt control (LMI, LMA, LAM,
// MII, CLI, EAI, DAI), interrupt service and buffer-channel service.  HLT jumps to
// the halt loop at the last address.
// The microprogram is this design's own; the SIC definition gives only the
// microword format.
package sic_c_ucode_pkg;
  function automatic logic [47:0] ucode(input logic [8:0] a);
    unique case (a)
      9'd0: ucode = 48'h4180401cc200;
      9'd1: ucode = 48'h3f0080000022;
      9'd2: ucode = 48'h0001801012f0;
      9'd3: ucode = 48'h1682403ca800;
      9'd4: ucode = 48'h0505c0000000;
      9'd5: ucode = 48'h038580000000;
      9'd6: ucode = 48'h068000000000;
      9'd7: ucode = 48'h000180a0c000;
      9'd8: ucode = 48'h000180000022;
      9'd9: ucode = 48'h068000102200;
      9'd10: ucode = 48'h060580000000;
      9'd11: ucode = 48'h068000b42800;
      9'd12: ucode = 48'h068000b82800;
      9'd13: ucode = 48'h098680000000;
      9'd14: ucode = 48'h088640000000;
      9'd15: ucode = 48'h0b0600000000;
      9'd16: ucode = 48'h0f8000000000;
      9'd17: ucode = 48'h0e0600000000;
      9'd18: ucode = 48'h0c8000000000;
      9'd19: ucode = 48'h158640000000;
      9'd20: ucode = 48'h120600000000;
      9'd21: ucode = 48'h138000000000;
      9'd22: ucode = 48'h000180a0c000;
      9'd23: ucode = 48'h000180000022;
      9'd24: ucode = 48'h000000105200;
      9'd25: ucode = 48'h000180a0c000;
      9'd26: ucode = 48'h000180000022;
      9'd27: ucode = 48'h000000d05a00;
      9'd28: ucode = 48'h000180a0c000;
      9'd29: ucode = 48'h000180000022;
      9'd30: ucode = 48'h000000d058e0;
      9'd31: ucode = 48'h000180a0c000;
      9'd32: ucode = 48'h000180000022;
      9'd33: ucode = 48'h000180307800;
      9'd34: ucode = 48'h1600c0100201;
      9'd36: ucode = 48'h000180a0c000;
      9'd37: ucode = 48'h000180c07000;
      9'd38: ucode = 48'h000000000001;
      9'd39: ucode = 48'h000180a0c000;
      9'd40: ucode = 48'h0001801c7200;
      9'd41: ucode = 48'h000180000001;
      9'd42: ucode = 48'h000000a4a800;
      9'd43: ucode = 48'h000000a0a000;
      9'd44: ucode = 48'h0000003ca800;
      9'd45: ucode = 48'h2c85c0000000;
      9'd46: ucode = 48'h1e0540000000;
      9'd47: ucode = 48'h190500000000;
      9'd48: ucode = 48'h1a04c0000000;
      9'd49: ucode = 48'h1a8000000000;
      9'd50: ucode = 48'hff84c0000000;
      9'd51: ucode = 48'h1a80000000b0;
      9'd52: ucode = 48'h0001800000c0;
      9'd53: ucode = 48'h1c0480000000;
      9'd54: ucode = 48'h1d0440000000;
      9'd55: ucode = 48'h228000000000;
      9'd56: ucode = 48'h1d8440000000;
      9'd57: ucode = 48'h228000005000;
      9'd58: ucode = 48'h228000405000;
      9'd59: ucode = 48'h228000c05400;
      9'd60: ucode = 48'h1f0580000000;
      9'd61: ucode = 48'h228000c05ce0;
      9'd62: ucode = 48'h228000c06ed0;
      9'd63: ucode = 48'h208580000000;
      9'd64: ucode = 48'h2b0000c05ce0;
      9'd65: ucode = 48'h2b0000c06ed0;
      9'd66: ucode = 48'h220580000000;
      9'd67: ucode = 48'h000000c05ce0;
      9'd68: ucode = 48'h000000c06ed0;
      9'd69: ucode = 48'h1f8400000000;
      9'd70: ucode = 48'h2683c0000000;
      9'd71: ucode = 48'h250380000000;
      9'd72: ucode = 48'h2a0340000000;
      9'd73: ucode = 48'h2b0000000000;
      9'd74: ucode = 48'h260340000000;
      9'd75: ucode = 48'h2b0000145200;
      9'd76: ucode = 48'h2b0000185200;
      9'd77: ucode = 48'h288380000000;
      9'd78: ucode = 48'h280340000000;
      9'd79: ucode = 48'h2b0000c08000;
      9'd80: ucode = 48'h2b0000348800;
      9'd81: ucode = 48'h298340000000;
      9'd82: ucode = 48'h2b0000c09000;
      9'd83: ucode = 48'h2b0000389800;
      9'd84: ucode = 48'h2b01c0000000;
      9'd85: ucode = 48'h160000000000;
      9'd86: ucode = 48'h210300000000;
      9'd87: ucode = 48'h160200c00000;
      9'd89: ucode = 48'h378580000000;
      9'd90: ucode = 48'h2e0540000000;
      9'd92: ucode = 48'h000180a0d000;
      9'd93: ucode = 48'h2e898800000b;
      9'd94: ucode = 48'h328440000000;
      9'd95: ucode = 48'h3403c0000000;
      9'd96: ucode = 48'h000180c07000;
      9'd97: ucode = 48'h308998000000;
      9'd98: ucode = 48'h000180000004;
      9'd99: ucode = 48'h318988000000;
      9'd100: ucode = 48'h000000000005;
      9'd101: ucode = 48'h000400000000;
      9'd102: ucode = 48'h000bc0000000;
      9'd103: ucode = 48'h000000000030;
      9'd104: ucode = 48'h360400000000;
      9'd105: ucode = 48'h348990000026;
      9'd106: ucode = 48'h000180000003;
      9'd107: ucode = 48'h000000105200;
      9'd108: ucode = 48'h360990000016;
      9'd109: ucode = 48'h1601a0000003;
      9'd111: ucode = 48'h3c04c0000000;
      9'd112: ucode = 48'h3a0480000000;
      9'd113: ucode = 48'h398440000000;
      9'd114: ucode = 48'h000000a0f000;
      9'd115: ucode = 48'h000000c0f000;
      9'd116: ucode = 48'h3b0440000000;
      9'd117: ucode = 48'h0000000c5200;
      9'd118: ucode = 48'h000180a0b400;
      9'd119: ucode = 48'h000000ecfa00;
      9'd120: ucode = 48'h3e0480000000;
      9'd121: ucode = 48'h3d8440000000;
      9'd122: ucode = 48'h000000a0e400;
      9'd123: ucode = 48'h0000000000a0;
      9'd124: ucode = 48'h000440000000;
      9'd125: ucode = 48'h000000000090;
      9'd126: ucode = 48'h00018060b080;
      9'd127: ucode = 48'h000180e0c090;
      9'd128: ucode = 48'h0001801c7200;
      9'd129: ucode = 48'h000180000001;
      9'd130: ucode = 48'h000000e4a800;
      9'd131: ucode = 48'h4281a8000000;
      9'd132: ucode = 48'h418000000070;
      9'd133: ucode = 48'h00018080c040;
      9'd134: ucode = 48'h000180000022;
      9'd135: ucode = 48'h00018010b200;
      9'd136: ucode = 48'h00018084c800;
      9'd137: ucode = 48'h000180000022;
      9'd138: ucode = 48'h000180f0c800;
      9'd139: ucode = 48'h000180e4b860;
      9'd140: ucode = 48'h4901b0000000;
      9'd141: ucode = 48'h000180000022;
      9'd142: ucode = 48'h470998000000;
      9'd143: ucode = 48'h000180000004;
      9'd144: ucode = 48'h480988000000;
      9'd145: ucode = 48'h4a8000000005;
      9'd146: ucode = 48'h490990000026;
      9'd147: ucode = 48'h000180000003;
      9'd148: ucode = 48'h000180000001;
      9'd149: ucode = 48'h4c80c0e00000;
      9'd150: ucode = 48'h00018080c060;
      9'd151: ucode = 48'h000180e07000;
      9'd152: ucode = 48'h000000000001;
      9'd153: ucode = 48'h000000000007;
      9'd511: ucode = 48'hff8000000000;
      default: ucode = 48'h0;
    endcase
  endfunction
  // entry points, for observation
  localparam logic [8:0] UA_FETCH = 9'd0;
  localparam logic [8:0] UA_SKIP  = 9'd44;
  localparam logic [8:0] UA_HALT  = 9'd511;
endpackage
