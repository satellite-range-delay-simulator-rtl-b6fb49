// rds_pkg - shared constants and types of the range delay simulator (RDS).
//
// The RDS delays a 64-bit parallel data stream by 75.9 ms to 151.7 ms in a
// three-bank FIFO memory. Each stored word is 70 bits wide: 64 data bits,
// four control bits that travel with the data (2-bit VCWCG code, VALID WORD
// flag, LAST WORD flag) and two spare channels. The package holds the word
// layout, the VCWCG divide codes and the 16-entry INITIAL DELAY CONTROL CODE
// table, and a helper that turns a binary word count into packed BCD for the
// decimal delay control counter.
//
// From the source design: 64+4 bit words in a 70-channel memory, the codes
// 00/01/10/11 dividing by 64/63/65/56, and the delay table values.
// Own choices: the bit positions of the control bits in the stored word.
package rds_pkg;

  localparam int unsigned DATA_W     = 64;  // parallel data word
  localparam int unsigned MEM_W      = 70;  // memory channels (64 data + 4 control + 2 spare)
  localparam int unsigned BIT_PER_WD = 64;  // high speed clocks per nominal word

  // VCWCG control code carried with every word.
  typedef enum logic [1:0] {
    VC_NOMINAL = 2'b00,  // divide by 64
    VC_ADVANCE = 2'b01,  // divide by 63
    VC_RETARD  = 2'b10,  // divide by 65
    VC_COARSE  = 2'b11   // divide by 56 (acquisition only)
  } vc_code_e;

  // The four control bits delayed with each data word.
  typedef struct packed {
    logic     last;   // last word of a frame
    logic     valid;  // word belongs to a valid data burst
    vc_code_e code;   // VCWCG code
  } word_ctrl_t;

  // One stored memory word: {spare[1:0], ctrl[3:0], data[63:0]}.
  typedef struct packed {
    logic [1:0]        spare;
    word_ctrl_t        ctrl;
    logic [DATA_W-1:0] data;
  } mem_word_t;

  // Division ratio of the variable count word clock generator.
  function automatic int unsigned vc_divisor(vc_code_e c);
    case (c)
      VC_ADVANCE: return 63;
      VC_RETARD:  return 65;
      VC_COARSE:  return 56;
      default:    return 64;
    endcase
  endfunction

  // Initial delay in words for each INITIAL DELAY CONTROL CODE (0..15).
  typedef int unsigned delay_table_t [16];
  localparam delay_table_t INIT_DELAY_WORDS = '{
    280000, 300000, 320000, 340000, 360000, 380000, 400000, 408000,
    416000, 424000, 432000, 440000, 460000, 480000, 500000, 520000
  };

  // Six decimal digits of the FIFO LEVEL - WORDS display.
  localparam int unsigned BCD_DIGITS = 6;
  typedef logic [4*BCD_DIGITS-1:0] bcd_t;

  function automatic bcd_t to_bcd(int unsigned v);
    bcd_t r = '0;
    int unsigned x = v;
    for (int i = 0; i < BCD_DIGITS; i++) begin
      r[4*i +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return r;
  endfunction

  // Increment of a packed BCD number (wraps at 999999).
  function automatic bcd_t bcd_inc(bcd_t v);
    bcd_t r = v;
    for (int i = 0; i < BCD_DIGITS; i++) begin
      if (r[4*i +: 4] == 4'd9) begin
        r[4*i +: 4] = 4'd0;
      end else begin
        r[4*i +: 4] = r[4*i +: 4] + 4'd1;
        break;
      end
    end
    return r;
  endfunction

endpackage
