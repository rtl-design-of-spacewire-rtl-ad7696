// spw_tb_pkg: reference SpaceWire character coder for the testbenches.
//
// Written from the character definitions, independently of the RTL: a
// character is parity bit, data-control flag, then 8 data bits or 2 control
// bits, LSB first; the parity bit makes previous payload + parity + flag odd.
// Control codes as sent: FCT 0,0  EOP 0,1  EEP 1,0  ESC 1,1. NULL = ESC FCT,
// time code = ESC + data character.
// spw_enc appends characters to a bit queue; spw_dec parses a bit queue
// (starting at the first NULL, found on the 1110100 pattern) into tokens.
package spw_tb_pkg;

  typedef enum int {T_NULL, T_FCT, T_DATA, T_EOP, T_EEP, T_TIME, T_ESCERR, T_PARERR} tok_kind_e;
  typedef struct { tok_kind_e kind; int val; } tok_t;

  class spw_enc;
    bit q[$];
    bit par_acc = 0;
    function void chr(bit flag, bit [7:0] d);
      bit p;
      int n;
      n = flag ? 2 : 8;
      p = ~(flag ^ par_acc);
      q.push_back(p);
      q.push_back(flag);
      par_acc = 0;
      for (int i = 0; i < n; i++) begin q.push_back(d[i]); par_acc ^= d[i]; end
    endfunction
    function void fct();  chr(1, 8'b00); endfunction
    function void eop();  chr(1, 8'b10); endfunction
    function void eep();  chr(1, 8'b01); endfunction
    function void esc();  chr(1, 8'b11); endfunction
    function void nul();  esc(); fct(); endfunction
    function void data(bit [7:0] d); chr(0, d); endfunction
    function void tcode(bit [7:0] t); esc(); chr(0, t); endfunction
    // corrupt the parity bit of the next character
    function void bad_parity_data(bit [7:0] d);
      chr(0, d);
      q[q.size()-10] = ~q[q.size()-10];
    endfunction
  endclass

  class spw_dec;
    tok_t toks[$];
    function void parse(bit b[$]);
      int i;
      bit par_acc, esc;
      bit [6:0] w;
      i = 0; w = 0; esc = 0;
      // find first NULL
      while (i < b.size()) begin
        w = {w[5:0], b[i]}; i++;
        if (w == 7'b1110100) break;
      end
      if (w != 7'b1110100) return;
      toks.push_back('{T_NULL, 0});
      par_acc = 0;
      while (i + 3 < b.size()) begin
        bit p, f;
        bit [7:0] d;
        int n;
        p = b[i]; f = b[i+1];
        n = f ? 2 : 8;
        if (i + 2 + n > b.size()) break;
        if ((p ^ f ^ par_acc) != 1) toks.push_back('{T_PARERR, i});
        d = 0;
        for (int k = 0; k < n; k++) d[k] = b[i+2+k];
        par_acc = ^d;
        i += 2 + n;
        if (f) begin
          case (d[1:0])
            2'b00: begin toks.push_back('{esc ? T_NULL : T_FCT, 0}); esc = 0; end
            2'b11: begin if (esc) toks.push_back('{T_ESCERR, 0}); esc = 1; end
            2'b10: begin toks.push_back('{esc ? T_ESCERR : T_EOP, 0}); esc = 0; end
            default: begin toks.push_back('{esc ? T_ESCERR : T_EEP, 0}); esc = 0; end
          endcase
        end else begin
          toks.push_back('{esc ? T_TIME : T_DATA, int'(d)});
          esc = 0;
        end
      end
    endfunction
  endclass

endpackage
