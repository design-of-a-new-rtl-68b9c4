// chaos_ref_pkg: reference models used by the testbenches, written apart from
// the RTL.  State values are Q8.24 held in 64-bit integers; products keep 24
// fraction bits by an arithmetic shift; an Euler update is wrapped to 32 bits.
// Integer coefficients are applied as plain integer multiplications, which the
// Q8.24 product reproduces exactly.
package chaos_ref_pkg;

  localparam longint ONE = 64'sd1 <<< 24;
  localparam longint HQ  = 64'sd16777;      // 0.001

  typedef struct {
    longint x;
    longint y;
    longint z;
  } state_t;

  function automatic longint q(input longint a, input longint b);
    return (a * b) >>> 24;
  endfunction

  function automatic longint upd(input longint v, input longint d);
    longint s;
    s = v + q(HQ, d);
    return longint'(int'(s));               // wrap to the 32-bit register
  endfunction

  function automatic state_t lorenz_step(input state_t s);
    state_t n;
    n.x = upd(s.x, 10 * (s.y - s.x));
    n.y = upd(s.y, 28 * s.x - s.y - q(s.x, s.z));
    n.z = upd(s.z, q(s.x, s.y) - q(64'sd44739243, s.z));
    return n;
  endfunction

  function automatic state_t rossler_step(input state_t s);
    state_t n;
    n.x = upd(s.x, -s.y - s.z);
    n.y = upd(s.y, s.x + q(64'sd3355443, s.y));
    n.z = upd(s.z, 64'sd3355443 + q(s.z, s.x - 64'sd95630131));
    return n;
  endfunction

  function automatic state_t chen_step(input state_t s);
    state_t n;
    n.x = upd(s.x, 35 * (s.y - s.x));
    n.y = upd(s.y, -7 * s.x - q(s.x, s.z) + 28 * s.y);
    n.z = upd(s.z, q(s.x, s.y) - 3 * s.z);
    return n;
  endfunction

  function automatic state_t lu_step(input state_t s);
    state_t n;
    n.x = upd(s.x, 36 * (s.y - s.x));
    n.y = upd(s.y, 20 * s.y - q(s.x, s.z));
    n.z = upd(s.z, q(s.x, s.y) - 3 * s.z);
    return n;
  endfunction

  function automatic state_t init_state(input int sys);
    state_t s;
    case (sys)
      0:       begin s.x = 0;            s.y = 5 * ONE;      s.z = 25 * ONE;    end
      1:       begin s.x = 64'sd1677722; s.y = 64'sd1677722; s.z = 64'sd1677722; end
      default: begin s.x = ONE;          s.y = ONE;          s.z = ONE;          end
    endcase
    return s;
  endfunction

  function automatic state_t sys_step(input int sys, input state_t s);
    case (sys)
      0:       return lorenz_step(s);
      1:       return rossler_step(s);
      2:       return chen_step(s);
      default: return lu_step(s);
    endcase
  endfunction

  // mixing rule: sw4 = 0 -> x of system sw1, 1 -> y of sw2, 2 -> z of sw3, 3 -> as 0
  function automatic int unsigned mix(input state_t s [4], input int sw1, input int sw2,
                                      input int sw3, input int sw4);
    case (sw4)
      1:       return int'(s[sw2].y);
      2:       return int'(s[sw3].z);
      default: return int'(s[sw1].x);
    endcase
  endfunction

  // logistic map on Q0.32 with r = 3.99 in Q4.28
  function automatic int unsigned logistic(input int unsigned x);
    longint unsigned p, r;
    p = longint'(x) * ((64'd1 << 32) - longint'(x));
    r = (p >> 32) * 64'd1071057469;
    return int'(r >> 28);
  endfunction

  // synthetic test image of the image ROM
  function automatic logic [15:0] image_pixel(input int unsigned a);
    int unsigned row, col;
    logic [15:0] p;
    row = (a / 256) % 256;
    col = a % 256;
    p[15:8] = 8'((row + col) % 256);
    p[7:0]  = 8'(row) ^ ((((row / 32) % 2) != ((col / 32) % 2)) ? 8'h40 : 8'h00);
    return p;
  endfunction

  // key stream: key k for selections sw1..sw4
  class key_model;
    state_t s [4];
    int sw1, sw2, sw3, sw4;
    function new(int a, int b, int c, int d);
      sw1 = a; sw2 = b; sw3 = c; sw4 = d;
      for (int i = 0; i < 4; i++) s[i] = init_state(i);
    endfunction
    function int unsigned next_key();
      int unsigned pre;
      pre = mix(s, sw1, sw2, sw3, sw4);
      for (int i = 0; i < 4; i++) s[i] = sys_step(i, s[i]);
      return logistic(pre);
    endfunction
  endclass

endpackage
