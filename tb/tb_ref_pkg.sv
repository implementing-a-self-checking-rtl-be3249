// tb_ref_pkg: reference model used by the testbenches. It recomputes the
// network's arithmetic with plain integers, independently of the RTL:
// weight classes from a literal 5x5 table, sigma_T from its definition, and
// the stability rule with alpha = 1/4.
package tb_ref_pkg;

  // Weight class of each window position, row-major.
  localparam int CLASS_TAB [25] = '{5,4,3,4,5,
                                    4,2,1,2,4,
                                    3,1,0,1,3,
                                    4,2,1,2,4,
                                    5,4,3,4,5};

  function automatic int floor_div(input int a, input int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int sigma(input int x, input int t);
    if (x <= -128 * t) return 0;
    if (x >=  128 * t) return 255;
    return floor_div(x + 128 * t, t);
  endfunction

  // Activation x = sum_i w_class(i) s_i - theta.
  function automatic int activation(input int s [25], input int w [6], input int theta);
    int x;
    x = -theta;
    for (int i = 0; i < 25; i++) x += w[CLASS_TAB[i]] * s[i];
    return x;
  endfunction

  function automatic int next_state(input int y, input int s);
    int d;
    d = (y > s) ? y - s : s - y;
    return (4 * d < s) ? s : 0;
  endfunction

  // Three iterations of the network from the pixel window p.
  function automatic void run_window(input int p [25], input int w [6], input int theta,
                                     input int t, output int s [25]);
    int y;
    s = p;
    for (int it = 0; it < 3; it++) begin
      y = sigma(activation(s, w, theta), t);
      for (int j = 0; j < 25; j++) s[j] = next_state(y, s[j]);
    end
  endfunction

endpackage
