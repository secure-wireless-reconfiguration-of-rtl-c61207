// instruction_capture: turns the character stream received from the
// transmitter into instruction-memory writes, and holds the core in reset
// while a new program is loaded.
//
// Protocol (example stream from the document: XXYX[50800][158C2][005F2]Y):
//   'X'        enter load mode: cfg_mode_o = 1 (core held in reset, LED 7
//              lit by led_gpio), load address back to 0. Also valid inside
//              load mode, where it restarts the load.
//   '['        begin a word (load mode only).
//   0-9 A-F a-f  hex digits of the word, least-significant digit first:
//              the k-th digit fills bits [4k+3:4k]; digits after the fifth
//              are ignored.
//   ']'        write bits [17:0] of the word to the instruction memory at the
//              load address and advance it; a word with no digits is dropped.
//   'Y'        leave load mode: cfg_mode_o = 0, the core restarts at PC 0.
//   other      ignored.
// Characters come from uart_rx as (rx_data_i, rx_valid_i) pulses; a memory
// write is issued one clock after the ']' arrives. The markers X, Y, [ and ]
// and the 5-digit, 18-bit words are taken from the document's example; the
// digit order is this design's reading, chosen because it makes the example
// a valid Gumnut program that puts 0x05 on the LEDs, as the document's
// simulation shows.
module instruction_capture
  import gumnut_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_i,
  input  byte_t  rx_data_i,
  input  logic   rx_valid_i,
  output logic   im_we_o,
  output iaddr_t im_addr_o,
  output inst_t  im_wdata_o,   // Wiconfig_Data[17:0]
  output logic   cfg_mode_o,
  output logic   load_done_o,  // one-cycle pulse on 'Y' that ends a load
  output iaddr_t words_o       // words written in the current / last load
);

  typedef enum logic [1:0] {C_RUN, C_CFG, C_WORD} cstate_e;

  cstate_e     state;
  logic [19:0] word;
  logic [2:0]  ndig;
  iaddr_t      addr;

  logic        is_hex;
  logic [3:0]  nib;

  always_comb begin
    is_hex = 1'b1;
    nib    = '0;
    if (rx_data_i >= 8'h30 && rx_data_i <= 8'h39)      nib = 4'(rx_data_i - 8'h30);
    else if (rx_data_i >= 8'h41 && rx_data_i <= 8'h46) nib = 4'(rx_data_i - 8'h37);
    else if (rx_data_i >= 8'h61 && rx_data_i <= 8'h66) nib = 4'(rx_data_i - 8'h57);
    else is_hex = 1'b0;
  end

  assign cfg_mode_o = (state != C_RUN);
  assign words_o    = addr;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state       <= C_RUN;
      word        <= '0;
      ndig        <= '0;
      addr        <= '0;
      im_we_o     <= 1'b0;
      im_addr_o   <= '0;
      im_wdata_o  <= '0;
      load_done_o <= 1'b0;
    end else begin
      im_we_o     <= 1'b0;
      load_done_o <= 1'b0;
      if (rx_valid_i) begin
        if (rx_data_i == CH_START) begin
          state <= C_CFG;
          addr  <= '0;
        end else if (rx_data_i == CH_END && state != C_RUN) begin
          state       <= C_RUN;
          load_done_o <= 1'b1;
        end else begin
          unique case (state)
            C_CFG: if (rx_data_i == CH_OPEN) begin
              state <= C_WORD;
              word  <= '0;
              ndig  <= '0;
            end
            C_WORD: begin
              if (is_hex && ndig < 3'd5) begin
                word[ndig*4 +: 4] <= nib;
                ndig <= ndig + 3'd1;
              end else if (rx_data_i == CH_CLOSE) begin
                state <= C_CFG;
                if (ndig != 3'd0) begin
                  im_we_o    <= 1'b1;
                  im_addr_o  <= addr;
                  im_wdata_o <= word[17:0];
                  addr       <= addr + 1'b1;
                end
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
