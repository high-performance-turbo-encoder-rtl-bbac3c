// qpp_lut: block length -> QPP interleaver coefficients (f1, f2).
//
// The table index of a block length K is computed with a five-range rule
// that follows the spacing of the LTE block sizes (steps of 8 below 512,
// 16 below 1024, 32 below 2048 and 64 up to 6144):
//   K <  512 : idx =       (K -   32)/8  - 1
//   K < 1024 : idx =  60 + (K -  512)/16 - 1
//   K < 2048 : idx =  92 + (K - 1024)/32 - 1
//   K < 4096 : idx = 124 + (K - 2048)/64 - 1
//   else     : idx = 156 + (K - 4096)/64 - 1
// The divisions are shifts, so no divider or search is needed. The index
// addresses a 188-entry ROM of (K, f1, f2) taken from the LTE turbo code
// interleaver table (3GPP TS 36.212, table 5.1.3-3); every entry gives a
// permutation pi(i) = (f1*i + f2*i^2) mod K. The five-range rule is the
// design's; the coefficient values are the standard's.
//
// Interface: purely combinational. k_in is any 13-bit value; legal is high
// only when k_in is one of the 188 sizes, and then entry.k == k_in.
module qpp_lut
  import turbo_pkg::*;
(
  input  blklen_t    k_in,
  output qpp_idx_t   idx,
  output qpp_entry_t entry,
  output logic       legal
);

  logic [K_W-1:0] off;

  always_comb begin
    if (k_in < 13'd512) begin
      off = k_in - 13'd32;
      idx = qpp_idx_t'(off >> 3) - 8'd1;
    end else if (k_in < 13'd1024) begin
      off = k_in - 13'd512;
      idx = 8'd60 + qpp_idx_t'(off >> 4) - 8'd1;
    end else if (k_in < 13'd2048) begin
      off = k_in - 13'd1024;
      idx = 8'd92 + qpp_idx_t'(off >> 5) - 8'd1;
    end else if (k_in < 13'd4096) begin
      off = k_in - 13'd2048;
      idx = 8'd124 + qpp_idx_t'(off >> 6) - 8'd1;
    end else begin
      off = k_in - 13'd4096;
      idx = 8'd156 + qpp_idx_t'(off >> 6) - 8'd1;
    end
  end

  // Coefficient ROM, rows ordered by block length.
  always_comb begin
    qpp_entry_t e;
    unique case (idx)
      8'd0  : e = {13'd40, 9'd3, 10'd10};
      8'd1  : e = {13'd48, 9'd7, 10'd12};
      8'd2  : e = {13'd56, 9'd19, 10'd42};
      8'd3  : e = {13'd64, 9'd7, 10'd16};
      8'd4  : e = {13'd72, 9'd7, 10'd18};
      8'd5  : e = {13'd80, 9'd11, 10'd20};
      8'd6  : e = {13'd88, 9'd5, 10'd22};
      8'd7  : e = {13'd96, 9'd11, 10'd24};
      8'd8  : e = {13'd104, 9'd7, 10'd26};
      8'd9  : e = {13'd112, 9'd41, 10'd84};
      8'd10 : e = {13'd120, 9'd103, 10'd90};
      8'd11 : e = {13'd128, 9'd15, 10'd32};
      8'd12 : e = {13'd136, 9'd9, 10'd34};
      8'd13 : e = {13'd144, 9'd17, 10'd108};
      8'd14 : e = {13'd152, 9'd9, 10'd38};
      8'd15 : e = {13'd160, 9'd21, 10'd120};
      8'd16 : e = {13'd168, 9'd101, 10'd84};
      8'd17 : e = {13'd176, 9'd21, 10'd44};
      8'd18 : e = {13'd184, 9'd57, 10'd46};
      8'd19 : e = {13'd192, 9'd23, 10'd48};
      8'd20 : e = {13'd200, 9'd13, 10'd50};
      8'd21 : e = {13'd208, 9'd27, 10'd52};
      8'd22 : e = {13'd216, 9'd11, 10'd36};
      8'd23 : e = {13'd224, 9'd27, 10'd56};
      8'd24 : e = {13'd232, 9'd85, 10'd58};
      8'd25 : e = {13'd240, 9'd29, 10'd60};
      8'd26 : e = {13'd248, 9'd33, 10'd62};
      8'd27 : e = {13'd256, 9'd15, 10'd32};
      8'd28 : e = {13'd264, 9'd17, 10'd198};
      8'd29 : e = {13'd272, 9'd33, 10'd68};
      8'd30 : e = {13'd280, 9'd103, 10'd210};
      8'd31 : e = {13'd288, 9'd19, 10'd36};
      8'd32 : e = {13'd296, 9'd19, 10'd74};
      8'd33 : e = {13'd304, 9'd37, 10'd76};
      8'd34 : e = {13'd312, 9'd19, 10'd78};
      8'd35 : e = {13'd320, 9'd21, 10'd120};
      8'd36 : e = {13'd328, 9'd21, 10'd82};
      8'd37 : e = {13'd336, 9'd115, 10'd84};
      8'd38 : e = {13'd344, 9'd193, 10'd86};
      8'd39 : e = {13'd352, 9'd21, 10'd44};
      8'd40 : e = {13'd360, 9'd133, 10'd90};
      8'd41 : e = {13'd368, 9'd81, 10'd46};
      8'd42 : e = {13'd376, 9'd45, 10'd94};
      8'd43 : e = {13'd384, 9'd23, 10'd48};
      8'd44 : e = {13'd392, 9'd243, 10'd98};
      8'd45 : e = {13'd400, 9'd151, 10'd40};
      8'd46 : e = {13'd408, 9'd155, 10'd102};
      8'd47 : e = {13'd416, 9'd25, 10'd52};
      8'd48 : e = {13'd424, 9'd51, 10'd106};
      8'd49 : e = {13'd432, 9'd47, 10'd72};
      8'd50 : e = {13'd440, 9'd91, 10'd110};
      8'd51 : e = {13'd448, 9'd29, 10'd168};
      8'd52 : e = {13'd456, 9'd29, 10'd114};
      8'd53 : e = {13'd464, 9'd247, 10'd58};
      8'd54 : e = {13'd472, 9'd29, 10'd118};
      8'd55 : e = {13'd480, 9'd89, 10'd180};
      8'd56 : e = {13'd488, 9'd91, 10'd122};
      8'd57 : e = {13'd496, 9'd157, 10'd62};
      8'd58 : e = {13'd504, 9'd55, 10'd84};
      8'd59 : e = {13'd512, 9'd31, 10'd64};
      8'd60 : e = {13'd528, 9'd17, 10'd66};
      8'd61 : e = {13'd544, 9'd35, 10'd68};
      8'd62 : e = {13'd560, 9'd227, 10'd420};
      8'd63 : e = {13'd576, 9'd65, 10'd96};
      8'd64 : e = {13'd592, 9'd19, 10'd74};
      8'd65 : e = {13'd608, 9'd37, 10'd76};
      8'd66 : e = {13'd624, 9'd41, 10'd234};
      8'd67 : e = {13'd640, 9'd39, 10'd80};
      8'd68 : e = {13'd656, 9'd185, 10'd82};
      8'd69 : e = {13'd672, 9'd43, 10'd252};
      8'd70 : e = {13'd688, 9'd21, 10'd86};
      8'd71 : e = {13'd704, 9'd155, 10'd44};
      8'd72 : e = {13'd720, 9'd79, 10'd120};
      8'd73 : e = {13'd736, 9'd139, 10'd92};
      8'd74 : e = {13'd752, 9'd23, 10'd94};
      8'd75 : e = {13'd768, 9'd217, 10'd48};
      8'd76 : e = {13'd784, 9'd25, 10'd98};
      8'd77 : e = {13'd800, 9'd17, 10'd80};
      8'd78 : e = {13'd816, 9'd127, 10'd102};
      8'd79 : e = {13'd832, 9'd25, 10'd52};
      8'd80 : e = {13'd848, 9'd239, 10'd106};
      8'd81 : e = {13'd864, 9'd17, 10'd48};
      8'd82 : e = {13'd880, 9'd137, 10'd110};
      8'd83 : e = {13'd896, 9'd215, 10'd112};
      8'd84 : e = {13'd912, 9'd29, 10'd114};
      8'd85 : e = {13'd928, 9'd15, 10'd58};
      8'd86 : e = {13'd944, 9'd147, 10'd118};
      8'd87 : e = {13'd960, 9'd29, 10'd60};
      8'd88 : e = {13'd976, 9'd59, 10'd122};
      8'd89 : e = {13'd992, 9'd65, 10'd124};
      8'd90 : e = {13'd1008, 9'd55, 10'd84};
      8'd91 : e = {13'd1024, 9'd31, 10'd64};
      8'd92 : e = {13'd1056, 9'd17, 10'd66};
      8'd93 : e = {13'd1088, 9'd171, 10'd204};
      8'd94 : e = {13'd1120, 9'd67, 10'd140};
      8'd95 : e = {13'd1152, 9'd35, 10'd72};
      8'd96 : e = {13'd1184, 9'd19, 10'd74};
      8'd97 : e = {13'd1216, 9'd39, 10'd76};
      8'd98 : e = {13'd1248, 9'd19, 10'd78};
      8'd99 : e = {13'd1280, 9'd199, 10'd240};
      8'd100: e = {13'd1312, 9'd21, 10'd82};
      8'd101: e = {13'd1344, 9'd211, 10'd252};
      8'd102: e = {13'd1376, 9'd21, 10'd86};
      8'd103: e = {13'd1408, 9'd43, 10'd88};
      8'd104: e = {13'd1440, 9'd149, 10'd60};
      8'd105: e = {13'd1472, 9'd45, 10'd92};
      8'd106: e = {13'd1504, 9'd49, 10'd846};
      8'd107: e = {13'd1536, 9'd71, 10'd48};
      8'd108: e = {13'd1568, 9'd13, 10'd28};
      8'd109: e = {13'd1600, 9'd17, 10'd80};
      8'd110: e = {13'd1632, 9'd25, 10'd102};
      8'd111: e = {13'd1664, 9'd183, 10'd104};
      8'd112: e = {13'd1696, 9'd55, 10'd954};
      8'd113: e = {13'd1728, 9'd127, 10'd96};
      8'd114: e = {13'd1760, 9'd27, 10'd110};
      8'd115: e = {13'd1792, 9'd29, 10'd112};
      8'd116: e = {13'd1824, 9'd29, 10'd114};
      8'd117: e = {13'd1856, 9'd57, 10'd116};
      8'd118: e = {13'd1888, 9'd45, 10'd354};
      8'd119: e = {13'd1920, 9'd31, 10'd120};
      8'd120: e = {13'd1952, 9'd59, 10'd610};
      8'd121: e = {13'd1984, 9'd185, 10'd124};
      8'd122: e = {13'd2016, 9'd113, 10'd420};
      8'd123: e = {13'd2048, 9'd31, 10'd64};
      8'd124: e = {13'd2112, 9'd17, 10'd66};
      8'd125: e = {13'd2176, 9'd171, 10'd136};
      8'd126: e = {13'd2240, 9'd209, 10'd420};
      8'd127: e = {13'd2304, 9'd253, 10'd216};
      8'd128: e = {13'd2368, 9'd367, 10'd444};
      8'd129: e = {13'd2432, 9'd265, 10'd456};
      8'd130: e = {13'd2496, 9'd181, 10'd468};
      8'd131: e = {13'd2560, 9'd39, 10'd80};
      8'd132: e = {13'd2624, 9'd27, 10'd164};
      8'd133: e = {13'd2688, 9'd127, 10'd504};
      8'd134: e = {13'd2752, 9'd143, 10'd172};
      8'd135: e = {13'd2816, 9'd43, 10'd88};
      8'd136: e = {13'd2880, 9'd29, 10'd300};
      8'd137: e = {13'd2944, 9'd45, 10'd92};
      8'd138: e = {13'd3008, 9'd157, 10'd188};
      8'd139: e = {13'd3072, 9'd47, 10'd96};
      8'd140: e = {13'd3136, 9'd13, 10'd28};
      8'd141: e = {13'd3200, 9'd111, 10'd240};
      8'd142: e = {13'd3264, 9'd443, 10'd204};
      8'd143: e = {13'd3328, 9'd51, 10'd104};
      8'd144: e = {13'd3392, 9'd51, 10'd212};
      8'd145: e = {13'd3456, 9'd451, 10'd192};
      8'd146: e = {13'd3520, 9'd257, 10'd220};
      8'd147: e = {13'd3584, 9'd57, 10'd336};
      8'd148: e = {13'd3648, 9'd313, 10'd228};
      8'd149: e = {13'd3712, 9'd271, 10'd232};
      8'd150: e = {13'd3776, 9'd179, 10'd236};
      8'd151: e = {13'd3840, 9'd331, 10'd120};
      8'd152: e = {13'd3904, 9'd363, 10'd244};
      8'd153: e = {13'd3968, 9'd375, 10'd248};
      8'd154: e = {13'd4032, 9'd127, 10'd168};
      8'd155: e = {13'd4096, 9'd31, 10'd64};
      8'd156: e = {13'd4160, 9'd33, 10'd130};
      8'd157: e = {13'd4224, 9'd43, 10'd264};
      8'd158: e = {13'd4288, 9'd33, 10'd134};
      8'd159: e = {13'd4352, 9'd477, 10'd408};
      8'd160: e = {13'd4416, 9'd35, 10'd138};
      8'd161: e = {13'd4480, 9'd233, 10'd280};
      8'd162: e = {13'd4544, 9'd357, 10'd142};
      8'd163: e = {13'd4608, 9'd337, 10'd480};
      8'd164: e = {13'd4672, 9'd37, 10'd146};
      8'd165: e = {13'd4736, 9'd71, 10'd444};
      8'd166: e = {13'd4800, 9'd71, 10'd120};
      8'd167: e = {13'd4864, 9'd37, 10'd152};
      8'd168: e = {13'd4928, 9'd39, 10'd462};
      8'd169: e = {13'd4992, 9'd127, 10'd234};
      8'd170: e = {13'd5056, 9'd39, 10'd158};
      8'd171: e = {13'd5120, 9'd39, 10'd80};
      8'd172: e = {13'd5184, 9'd31, 10'd96};
      8'd173: e = {13'd5248, 9'd113, 10'd902};
      8'd174: e = {13'd5312, 9'd41, 10'd166};
      8'd175: e = {13'd5376, 9'd251, 10'd336};
      8'd176: e = {13'd5440, 9'd43, 10'd170};
      8'd177: e = {13'd5504, 9'd21, 10'd86};
      8'd178: e = {13'd5568, 9'd43, 10'd174};
      8'd179: e = {13'd5632, 9'd45, 10'd176};
      8'd180: e = {13'd5696, 9'd45, 10'd178};
      8'd181: e = {13'd5760, 9'd161, 10'd120};
      8'd182: e = {13'd5824, 9'd89, 10'd182};
      8'd183: e = {13'd5888, 9'd323, 10'd184};
      8'd184: e = {13'd5952, 9'd47, 10'd186};
      8'd185: e = {13'd6016, 9'd23, 10'd94};
      8'd186: e = {13'd6080, 9'd47, 10'd190};
      8'd187: e = {13'd6144, 9'd263, 10'd480};
      default: e = '0;
    endcase
    entry = e;
  end

  assign legal = (k_in >= blklen_t'(KMIN)) && (k_in <= blklen_t'(KMAX)) &&
                 (idx < qpp_idx_t'(NUM_SIZES)) && (entry.k == k_in);

endmodule
