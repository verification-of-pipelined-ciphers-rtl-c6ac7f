// Reference data and reference arithmetic for the WG testbenches.
//
// The constants were produced by an independent model of WG that works in the
// polynomial basis of GF(2^29) (g(x) of the thesis) and converts to and from
// the normal basis of gamma; they do not depend on the RTL's multiplication
// table. The functions below form a second, slow reference in the normal
// basis: ref_mul uses the multiplication matrix derived from g(x) and gamma
// by wg_pkg::compute_lambda (not the written-out pair table of the RTL), and
// ref_core evaluates t(x+1)+1 straight from its five exponents.
//
// WG_LOAD holds the 11 serial load words for key 80000000000000000000 and
// IV 01234567 in loading order (the word for S(11) first). Key bit k1 is the
// most significant key bit, IV1 the most significant IV bit, and S_j(i) is
// normal-basis bit j-1 of stage i; "k17..32 + 1" is taken as inverting those
// 16 bits. WG_KS holds the first 128 keystream bits of the non-pipelined
// cipher for that state, first bit in the most significant position.
package wg_tb_pkg;
  import wg_pkg::*;

  localparam int unsigned NV = 10;
  localparam gf_t MUL_A [10] = '{
    29'hD4BB9EE, 29'h098CC68, 29'h1F29D9ED, 29'h108F66B,
    29'h351C734, 29'h1B1E1138, 29'hE3B0262, 29'h14DECC4D,
    29'h1FFFFFFF, 29'h0000001
  };
  localparam gf_t MUL_B [10] = '{
    29'h7319FA2, 29'h19B2C8B9, 29'hB2FA638, 29'h2BC95FB,
    29'h1FF5ADD1, 29'hFEEB6FC, 29'hA899DFA, 29'h1D5BC908,
    29'h1372EA67, 29'h0000001
  };
  localparam gf_t MUL_P [10] = '{
    29'h15E9095F, 29'h1C4563B, 29'h1402F11F, 29'h9653949,
    29'h42FFC6B, 29'h1342E966, 29'h78B6FED, 29'h90E169C,
    29'h1372EA67, 29'h0000002
  };
  localparam gf_t VEC_X [10] = '{
    29'h0000000, 29'h1FFFFFFF, 29'h0000001, 29'h10000000,
    29'h118A30F8, 29'h26F8AD5, 29'hB110DE7, 29'h13272AB7,
    29'h1B090525, 29'h136237E1
  };
  localparam gf_t POW_E [10] = '{
    29'h0000000, 29'h1FFFFFFF, 29'h1F37BE61, 29'h1F9BDF30,
    29'h13CE056D, 29'h436AB60, 29'h46A4117, 29'h260434A,
    29'hC1DE696, 29'h08C01DA
  };
  localparam gf_t CORE_Y [10] = '{
    29'h0000000, 29'h1FFFFFFF, 29'h1CA96156, 29'hE54B0AB,
    29'h6A14F04, 29'h740DAB9, 29'hE6D7561, 29'hC2FA618,
    29'hE53F672, 29'hCBBCA80
  };
  localparam gf_t WG_LOAD [11] = '{
    29'h0000000, 29'h000FFFF, 29'h0000001, 29'h0000000,
    29'h0000000, 29'h0000000, 29'h0000000, 29'h0E60000,
    29'h0A20000, 29'h0C40000, 29'h0800001
  };
  localparam logic [127:0] WG_KS = 128'h7BF5AA166CB7A03AF65E6CE3EF803359;

  localparam lambda_t REF_LAMBDA = compute_lambda();

  function automatic gf_t ror(input gf_t x, input int unsigned r);
    logic [2*M-1:0] xx;
    xx = {x, x} >> r;
    return xx[M-1:0];
  endfunction

  function automatic gf_t ref_mul(input gf_t a, input gf_t b);
    gf_t c;
    c = '0;
    // bit k of the term for (i, j) is a[(i+k)%M] & b[(j+k)%M]: a rotated
    // right by i ANDed with b rotated right by j
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        if (REF_LAMBDA[i][j]) c = c ^ (ror(a, i) & ror(b, j));
    return c;
  endfunction

  function automatic gf_t ref_pow(input gf_t x, input logic [M-1:0] e);
    gf_t r, b;
    r = '1;
    b = x;
    for (int i = 0; i < M; i++) begin
      if (e[i]) r = ref_mul(r, b);
      b = ref_mul(b, b);
    end
    return r;
  endfunction

  function automatic gf_t ref_core(input gf_t x);
    gf_t xp, s;
    xp = ~x;
    s = xp;
    s = s ^ ref_pow(xp, 29'(1 + 2**10));
    s = s ^ ref_pow(xp, 29'(1 + 2**9 + 2**19));
    s = s ^ ref_pow(xp, 29'(1 + 2**19 - 2**9));
    s = s ^ ref_pow(xp, 29'(2**19 + 2**10 - 1));
    return ~s;
  endfunction
endpackage
