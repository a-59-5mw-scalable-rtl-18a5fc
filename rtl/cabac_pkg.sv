// Tables and state transition of the H.264 context-adaptive binary
// arithmetic coder (CABAC), shared by the decoder and its testbench.
//
// range_lps returns the LPS sub-range for a probability state (0..63) and the
// quarter of the current range it falls in; next_state_lps/mps give the
// probability state after a least/most probable symbol. The numbers are the
// ones the H.264 standard defines (its rangeTabLPS and transIdxLPS tables);
// the MPS transition is min(state + 1, 62), and state 63 stays 63.
// bin_mode_e names the three bin decoding processes of the standard.
package cabac_pkg;

  typedef enum logic [1:0] {
    BIN_REGULAR = 2'd0,  // context-coded bin
    BIN_BYPASS  = 2'd1,  // equiprobable bin, no model
    BIN_TERM    = 2'd2   // terminating bin (end of slice, before PCM samples)
  } bin_mode_e;

  typedef struct packed {
    logic [5:0] state;  // probability state index
    logic       mps;    // value of the most probable symbol
  } ctx_t;

  function automatic logic [7:0] range_lps(input logic [5:0] state, input logic [1:0] q);
    logic [31:0] row;  // {q3, q2, q1, q0}
    case (state)
      6'd0: row = {8'd240, 8'd208, 8'd176, 8'd128};
      6'd1: row = {8'd227, 8'd197, 8'd167, 8'd128};
      6'd2: row = {8'd216, 8'd187, 8'd158, 8'd128};
      6'd3: row = {8'd205, 8'd178, 8'd150, 8'd123};
      6'd4: row = {8'd195, 8'd169, 8'd142, 8'd116};
      6'd5: row = {8'd185, 8'd160, 8'd135, 8'd111};
      6'd6: row = {8'd175, 8'd152, 8'd128, 8'd105};
      6'd7: row = {8'd166, 8'd144, 8'd122, 8'd100};
      6'd8: row = {8'd158, 8'd137, 8'd116, 8'd95};
      6'd9: row = {8'd150, 8'd130, 8'd110, 8'd90};
      6'd10: row = {8'd142, 8'd123, 8'd104, 8'd85};
      6'd11: row = {8'd135, 8'd117, 8'd99, 8'd81};
      6'd12: row = {8'd128, 8'd111, 8'd94, 8'd77};
      6'd13: row = {8'd122, 8'd105, 8'd89, 8'd73};
      6'd14: row = {8'd116, 8'd100, 8'd85, 8'd69};
      6'd15: row = {8'd110, 8'd95, 8'd80, 8'd66};
      6'd16: row = {8'd104, 8'd90, 8'd76, 8'd62};
      6'd17: row = {8'd99, 8'd86, 8'd72, 8'd59};
      6'd18: row = {8'd94, 8'd81, 8'd69, 8'd56};
      6'd19: row = {8'd89, 8'd77, 8'd65, 8'd53};
      6'd20: row = {8'd85, 8'd73, 8'd62, 8'd51};
      6'd21: row = {8'd80, 8'd69, 8'd59, 8'd48};
      6'd22: row = {8'd76, 8'd66, 8'd56, 8'd46};
      6'd23: row = {8'd72, 8'd63, 8'd53, 8'd43};
      6'd24: row = {8'd69, 8'd59, 8'd50, 8'd41};
      6'd25: row = {8'd65, 8'd56, 8'd48, 8'd39};
      6'd26: row = {8'd62, 8'd54, 8'd45, 8'd37};
      6'd27: row = {8'd59, 8'd51, 8'd43, 8'd35};
      6'd28: row = {8'd56, 8'd48, 8'd41, 8'd33};
      6'd29: row = {8'd53, 8'd46, 8'd39, 8'd32};
      6'd30: row = {8'd50, 8'd43, 8'd37, 8'd30};
      6'd31: row = {8'd48, 8'd41, 8'd35, 8'd29};
      6'd32: row = {8'd45, 8'd39, 8'd33, 8'd27};
      6'd33: row = {8'd43, 8'd37, 8'd31, 8'd26};
      6'd34: row = {8'd41, 8'd35, 8'd30, 8'd24};
      6'd35: row = {8'd39, 8'd33, 8'd28, 8'd23};
      6'd36: row = {8'd37, 8'd32, 8'd27, 8'd22};
      6'd37: row = {8'd35, 8'd30, 8'd26, 8'd21};
      6'd38: row = {8'd33, 8'd29, 8'd24, 8'd20};
      6'd39: row = {8'd31, 8'd27, 8'd23, 8'd19};
      6'd40: row = {8'd30, 8'd26, 8'd22, 8'd18};
      6'd41: row = {8'd28, 8'd25, 8'd21, 8'd17};
      6'd42: row = {8'd27, 8'd23, 8'd20, 8'd16};
      6'd43: row = {8'd25, 8'd22, 8'd19, 8'd15};
      6'd44: row = {8'd24, 8'd21, 8'd18, 8'd14};
      6'd45: row = {8'd23, 8'd20, 8'd17, 8'd14};
      6'd46: row = {8'd22, 8'd19, 8'd16, 8'd13};
      6'd47: row = {8'd21, 8'd18, 8'd15, 8'd12};
      6'd48: row = {8'd20, 8'd17, 8'd14, 8'd12};
      6'd49: row = {8'd19, 8'd16, 8'd14, 8'd11};
      6'd50: row = {8'd18, 8'd15, 8'd13, 8'd11};
      6'd51: row = {8'd17, 8'd15, 8'd12, 8'd10};
      6'd52: row = {8'd16, 8'd14, 8'd12, 8'd10};
      6'd53: row = {8'd15, 8'd13, 8'd11, 8'd9};
      6'd54: row = {8'd14, 8'd12, 8'd11, 8'd9};
      6'd55: row = {8'd14, 8'd12, 8'd10, 8'd8};
      6'd56: row = {8'd13, 8'd11, 8'd9, 8'd8};
      6'd57: row = {8'd12, 8'd11, 8'd9, 8'd7};
      6'd58: row = {8'd12, 8'd10, 8'd9, 8'd7};
      6'd59: row = {8'd11, 8'd10, 8'd8, 8'd7};
      6'd60: row = {8'd11, 8'd9, 8'd8, 8'd6};
      6'd61: row = {8'd10, 8'd9, 8'd7, 8'd6};
      6'd62: row = {8'd9, 8'd8, 8'd7, 8'd6};
      6'd63: row = {8'd2, 8'd2, 8'd2, 8'd2};
      default: row = '0;
    endcase
    return row[q*8 +: 8];
  endfunction

  function automatic logic [5:0] next_state_lps(input logic [5:0] state);
    case (state)
      6'd0: return 6'd0; 6'd1: return 6'd0; 6'd2: return 6'd1; 6'd3: return 6'd2; 6'd4: return 6'd2; 6'd5: return 6'd4; 6'd6: return 6'd4; 6'd7: return 6'd5;
      6'd8: return 6'd6; 6'd9: return 6'd7; 6'd10: return 6'd8; 6'd11: return 6'd9; 6'd12: return 6'd9; 6'd13: return 6'd11; 6'd14: return 6'd11; 6'd15: return 6'd12;
      6'd16: return 6'd13; 6'd17: return 6'd13; 6'd18: return 6'd15; 6'd19: return 6'd15; 6'd20: return 6'd16; 6'd21: return 6'd16; 6'd22: return 6'd18; 6'd23: return 6'd18;
      6'd24: return 6'd19; 6'd25: return 6'd19; 6'd26: return 6'd21; 6'd27: return 6'd21; 6'd28: return 6'd22; 6'd29: return 6'd22; 6'd30: return 6'd23; 6'd31: return 6'd24;
      6'd32: return 6'd24; 6'd33: return 6'd25; 6'd34: return 6'd26; 6'd35: return 6'd26; 6'd36: return 6'd27; 6'd37: return 6'd27; 6'd38: return 6'd28; 6'd39: return 6'd29;
      6'd40: return 6'd29; 6'd41: return 6'd30; 6'd42: return 6'd30; 6'd43: return 6'd30; 6'd44: return 6'd31; 6'd45: return 6'd32; 6'd46: return 6'd32; 6'd47: return 6'd33;
      6'd48: return 6'd33; 6'd49: return 6'd33; 6'd50: return 6'd34; 6'd51: return 6'd34; 6'd52: return 6'd35; 6'd53: return 6'd35; 6'd54: return 6'd35; 6'd55: return 6'd36;
      6'd56: return 6'd36; 6'd57: return 6'd36; 6'd58: return 6'd37; 6'd59: return 6'd37; 6'd60: return 6'd37; 6'd61: return 6'd38; 6'd62: return 6'd38; 6'd63: return 6'd63;
      default: return 6'd0;
    endcase
  endfunction

  function automatic logic [5:0] next_state_mps(input logic [5:0] state);
    return (state >= 6'd62) ? state : state + 6'd1;
  endfunction

endpackage
