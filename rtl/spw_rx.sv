// spw_rx: SpaceWire receiver character decoder.
//
// Takes the bit stream recovered from D and S (one bit_valid strobe per bit)
// and turns it into characters. Until the first NULL nothing is decoded: the
// last seven bits are compared with 1110100, which is the control flag and
// code of ESC, the parity bit of the following FCT, and the flag and code of
// that FCT. On a match got_null pulses and the decoder is aligned: the next
// bit is a parity bit.
//
// After that each character is read as parity bit, flag, then 2 or 8 payload
// bits (LSB first). The parity is checked when the flag arrives (odd over the
// previous payload, the parity bit and the flag); a mismatch pulses err_par.
// A finished character gives one of: got_fct (FCT), got_null (ESC then FCT),
// got_time with time_code (ESC then a data character), got_nchar with nchar
// (a data character, EOP or EEP), err_esc (ESC followed by ESC, EOP or EEP),
// and err_empty when an EOP/EEP directly follows an EOP/EEP.
// All outputs are one-cycle pulses, one clock after the last bit's strobe.
// While enable is low the decoder is held cleared (no NULL seen).
// The character formats, the 1110100 NULL detection and the error rules are
// SpaceWire's; accepting ESC + data character as a time code is this
// design's reading.
module spw_rx
  import spw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       bit_valid,
  input  logic       bit_val,
  output logic       null_seen,
  output logic       got_null,
  output logic       got_fct,
  output logic       got_nchar,
  output nchar_t     nchar,
  output logic       got_time,
  output logic [7:0] time_code,
  output logic       err_par,
  output logic       err_esc,
  output logic       err_empty
);

  localparam logic [6:0] NULL_SEQ = 7'b1110100;

  logic [6:0] last7;
  logic [3:0] idx;      // bit index within the character
  logic       flag;     // control flag of the current character
  logic       par_bit;  // parity bit of the current character
  logic       par_acc;  // xor of the previous payload
  logic       run_par;  // xor of the current payload so far
  logic [7:0] pl;
  logic       esc_pend;
  logic       last_eop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last7 <= '0; idx <= '0; flag <= 1'b0; par_bit <= 1'b0; par_acc <= 1'b0;
      run_par <= 1'b0; pl <= '0; esc_pend <= 1'b0; last_eop <= 1'b0; null_seen <= 1'b0;
      got_null <= 1'b0; got_fct <= 1'b0; got_nchar <= 1'b0; nchar <= '0;
      got_time <= 1'b0; time_code <= '0; err_par <= 1'b0; err_esc <= 1'b0; err_empty <= 1'b0;
    end else begin
      got_null <= 1'b0; got_fct <= 1'b0; got_nchar <= 1'b0; got_time <= 1'b0;
      err_par <= 1'b0; err_esc <= 1'b0; err_empty <= 1'b0;
      if (!enable) begin
        last7 <= '0; idx <= '0; esc_pend <= 1'b0; last_eop <= 1'b0; null_seen <= 1'b0;
        par_acc <= 1'b0; run_par <= 1'b0;
      end else if (bit_valid) begin
        if (!null_seen) begin
          last7 <= {last7[5:0], bit_val};
          if ({last7[5:0], bit_val} == NULL_SEQ) begin
            got_null  <= 1'b1;
            null_seen <= 1'b1;
            idx       <= '0;
            par_acc   <= 1'b0;   // payload of the FCT was 0,0
          end
        end else begin
          case (idx)
            4'd0: begin
              par_bit <= bit_val;
              idx     <= 4'd1;
            end
            4'd1: begin
              flag    <= bit_val;
              run_par <= 1'b0;
              if ((par_bit ^ bit_val ^ par_acc) != 1'b1) err_par <= 1'b1;
              idx     <= 4'd2;
            end
            default: begin
              pl      <= {bit_val, pl[7:1]};
              run_par <= run_par ^ bit_val;
              if ((flag && idx == 4'd3) || (!flag && idx == 4'd9)) begin
                idx     <= '0;
                par_acc <= run_par ^ bit_val;
                if (flag) begin
                  // control code, first bit in pl[7]
                  unique case ({bit_val, pl[7]})
                    CC_FCT: begin
                      if (esc_pend) got_null <= 1'b1;
                      else          got_fct  <= 1'b1;
                      esc_pend <= 1'b0;
                    end
                    CC_ESC: begin
                      if (esc_pend) err_esc <= 1'b1;
                      esc_pend <= 1'b1;
                    end
                    default: begin  // EOP or EEP
                      if (esc_pend) err_esc <= 1'b1;
                      else begin
                        got_nchar <= 1'b1;
                        nchar     <= ({bit_val, pl[7]} == CC_EEP) ? NCHAR_EEP : NCHAR_EOP;
                        if (last_eop) err_empty <= 1'b1;
                        last_eop  <= 1'b1;
                      end
                      esc_pend <= 1'b0;
                    end
                  endcase
                end else begin
                  if (esc_pend) begin
                    got_time  <= 1'b1;
                    time_code <= {bit_val, pl[7:1]};
                  end else begin
                    got_nchar <= 1'b1;
                    nchar     <= {1'b0, bit_val, pl[7:1]};
                    last_eop  <= 1'b0;
                  end
                  esc_pend <= 1'b0;
                end
              end else begin
                idx <= idx + 4'd1;
              end
            end
          endcase
        end
      end
    end
  end

endmodule
