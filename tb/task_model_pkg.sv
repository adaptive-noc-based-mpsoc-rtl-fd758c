// task_model_pkg: stand-in arithmetic for the tasks of the authentication
// algorithm, used by the behavioural processing elements of the system
// testbench and by its reference model.
//
// The real tasks (window average, XYZ / RGB / Lab colour projections,
// colour and multispectral distances) run as software on 32-bit processors.
// Only the window average is reproduced as such (mean over the window of
// every wavelength); the projections and distances are replaced by simple
// integer functions with the same input and output sizes (a wavelength
// vector in, three colour values out; two vectors in, one distance out), so
// that every value that crosses the network can be checked.
package task_model_pkg;
  typedef enum int {K_AVG, K_XYZ, K_RGB, K_LAB, K_DIST} kind_e;
  typedef int unsigned word_q[$];

  // mean of every wavelength over the window; in holds pixel-major samples
  function automatic word_q f_avg(input word_q in, input int unsigned nl, input int unsigned np);
    word_q o;
    for (int unsigned l = 0; l < nl; l++) begin
      longint unsigned s = 0;
      for (int unsigned p = 0; p < np; p++) s += longint'(in[p * nl + l]);
      o.push_back(int'(s / longint'(np)));
    end
    return o;
  endfunction

  // spectrum -> three colour values
  function automatic word_q f_xyz(input word_q in);
    word_q o;
    for (int unsigned c = 0; c < 3; c++) begin
      int unsigned s = 0;
      for (int unsigned l = 0; l < in.size(); l++) s += in[l] * (((c * 5 + l * 3) % 7) + 1);
      o.push_back(s >> 4);
    end
    return o;
  endfunction

  function automatic word_q f_rgb(input word_q in);
    word_q o;
    o.push_back(3 * in[0] - in[1] - in[2] / 2);
    o.push_back(2 * in[1] - in[0] / 2);
    o.push_back(in[2] + in[0] / 4);
    return o;
  endfunction

  function automatic word_q f_lab(input word_q in);
    word_q o;
    for (int unsigned c = 0; c < 3; c++) o.push_back(in[c] ^ (in[(c + 1) % 3] >> 1));
    return o;
  endfunction

  // squared distance of two vectors
  function automatic word_q f_dist(input word_q a, input word_q b);
    word_q o;
    int unsigned s = 0;
    for (int unsigned i = 0; i < a.size(); i++) s += (a[i] - b[i]) * (a[i] - b[i]);
    o.push_back(s);
    return o;
  endfunction
endpackage
